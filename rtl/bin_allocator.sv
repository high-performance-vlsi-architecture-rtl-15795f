// Allocation of feature vectors to histogram bins (J processing elements).
//
// Every feature vector j has a PE that holds its cell index vector (COMP_I, read
// from the vector bank) and a BINNED flag. A counter (register plus incrementer)
// steps the reference number t from 0 to num_vec-1 and a multiplexer broadcasts vector
// t (REF_I) to all PEs. In each PE a comparator raises EQU when the two vectors
// are equal, and UPDATE = NOR(BINNED, not EQU) is high when the PE matches the
// reference and has no bin yet. The ones compressor counts the UPDATE bits: that
// count is the density of the bin. At the clock edge every updating PE sets
// BINNED and stores t as its bin and the count as its bin's density. If vector t
// already has a bin no PE updates and the count is zero, so each bin is counted
// once and is named by its lowest-numbered vector (its head).
// After the sweep num_bins holds the number of non-empty bins.
// Only the first num_vec vectors (1..J, sampled at start) take part; the sweep
// then lasts num_vec cycles and the other PEs never update.
// Timing: start (one cycle, while idle) clears BINNED; the sweep runs in the next
// num_vec cycles with busy high; done pulses for one cycle after the last step.
// The PE array is written as a loop over the J PEs. One broadcast multiplexer is
// shared by all PEs; a multiplexer per PE would make the same comparisons.
module bin_allocator #(
  parameter int unsigned J  = cluster_pkg::J_VEC,
  parameter int unsigned N  = cluster_pkg::N_DIM,
  localparam int unsigned JW = cluster_pkg::id_width(J),
  localparam int unsigned CW = cluster_pkg::cmp_width(J),
  localparam int unsigned VW = N * cluster_pkg::IDX_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [JW:0]   num_vec,   // vectors in this frame, 1..J
  input  logic [VW-1:0] vec  [J],
  output logic          busy,
  output logic          done,
  output logic [JW-1:0] bin  [J],
  output logic [CW-1:0] dens [J],
  output logic [JW:0]   num_bins
);

  logic [JW-1:0] t;
  logic [VW-1:0] ref_vec;
  logic [J-1:0]  binned;
  logic [J-1:0]  update;
  logic [CW-1:0] count;

  assign ref_vec = vec[t];

  // comparator and NOR of every PE
  always_comb begin
    for (int j = 0; j < J; j++) begin
      update[j] = busy & (32'(j) < 32'(num_vec)) & ~(binned[j] | ~(vec[j] == ref_vec));
    end
  end

  ones_compressor #(.J(J)) u_cmp (.bits(update), .count(count));

  // PE registers: BINNED, bin number, bin density
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < J; j++) begin
        binned[j] <= 1'b0;
        bin[j]  <= '0;
        dens[j] <= '0;
      end
    end else if (start && !busy) begin
      for (int j = 0; j < J; j++) binned[j] <= 1'b0;
    end else begin
      for (int j = 0; j < J; j++) begin
        if (update[j]) begin
          binned[j] <= 1'b1;
          bin[j]    <= t;
          dens[j]   <= count;
        end
      end
    end
  end

  // reference counter and sweep control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t        <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      num_bins <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          t        <= '0;
          num_bins <= '0;
        end
      end else begin
        if (count != '0) num_bins <= num_bins + 1'b1;
        if (t == JW'(num_vec - 1'b1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          t <= t + 1'b1;
        end
      end
    end
  end

endmodule
