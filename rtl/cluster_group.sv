// Cluster grouping and cluster count.
//
// Two things happen side by side. The ones compressor counts the peak flags, and
// that count (the number of clusters) is registered when the stage starts. A sweep
// then steps t over 0..num_vec-1; when vector t is a peak it receives the next label
// number (0, 1, 2, ... in the order of the peak vector numbers), and every vector
// whose root is t takes that label in the same cycle.
// The sweep covers vectors 0..num_vec-1.
// Timing: start (while idle) registers num_clusters; the num_vec-cycle sweep follows
// with busy high; done pulses for one cycle after it.
module cluster_group #(
  parameter int unsigned J  = cluster_pkg::J_VEC,
  localparam int unsigned JW = cluster_pkg::id_width(J),
  localparam int unsigned CW = cluster_pkg::cmp_width(J)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [JW:0]   num_vec,   // vectors in this frame, 1..J
  input  logic [JW-1:0] root  [J],
  input  logic [J-1:0]  peak,
  output logic          busy,
  output logic          done,
  output logic [JW-1:0] label [J],
  output logic [CW-1:0] num_clusters
);

  logic [JW-1:0] t;
  logic [JW-1:0] next_label;
  logic [CW-1:0] peak_count;
  logic          grant;       // vector t is a peak: hand out next_label

  ones_compressor #(.J(J)) u_cmp (.bits(peak), .count(peak_count));

  assign grant = busy && peak[t];

  // label register of every vector
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < J; j++) label[j] <= '0;
    end else if (grant) begin
      for (int j = 0; j < J; j++) begin
        if (root[j] == t) label[j] <= next_label;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t            <= '0;
      busy         <= 1'b0;
      done         <= 1'b0;
      next_label   <= '0;
      num_clusters <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy         <= 1'b1;
          t            <= '0;
          next_label   <= '0;
          num_clusters <= peak_count;
        end
      end else begin
        if (grant) next_label <= next_label + 1'b1;
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
