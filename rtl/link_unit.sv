// Link stage: peak climbing over the histogram bins (J processing elements).
//
// Peak climbing links every bin to the neighbouring bin of largest density, when
// that density is larger than its own; a bin with no denser neighbour is a peak.
// As in the allocation stage, a counter steps t over 0..num_vec-1 and vector t, the
// density of its bin and whether it heads a bin (its bin number is t) are
// broadcast to one PE per vector. Each PE tests the broadcast cell with the
// neighbour detector (|a - b| <= 1 in each of the N dimensions, all ANDed) and
// keeps it as parent when it heads a bin, is a neighbour and is denser than the
// best seen so far. start loads each PE's own bin as parent and that bin's
// density as best, so members of a bin follow their head and peaks keep
// themselves. Ties keep the first (lowest-numbered) bin.
// Only vectors 0..num_vec-1 are broadcast; PEs beyond them are ignored later.
// Timing: start (while idle) initialises; the num_vec-cycle sweep follows with busy
// high; done pulses for one cycle after the last step.
module link_unit #(
  parameter int unsigned J  = cluster_pkg::J_VEC,
  parameter int unsigned N  = cluster_pkg::N_DIM,
  localparam int unsigned JW = cluster_pkg::id_width(J),
  localparam int unsigned CW = cluster_pkg::cmp_width(J),
  localparam int unsigned IW = cluster_pkg::IDX_W,
  localparam int unsigned VW = N * IW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [JW:0]   num_vec,   // vectors in this frame, 1..J
  input  logic [VW-1:0] vec    [J],
  input  logic [JW-1:0] bin    [J],
  input  logic [CW-1:0] dens   [J],
  output logic          busy,
  output logic          done,
  output logic [JW-1:0] parent [J]
);

  // Neighbour detector cell.
  function automatic logic is_neighbor(logic [VW-1:0] ref_vec, logic [VW-1:0] comp_vec);
    logic nb = 1'b1;
    for (int k = 0; k < N; k++) begin
      logic [IW-1:0] a, b;
      a = ref_vec [k*IW +: IW];
      b = comp_vec[k*IW +: IW];
      nb &= (a >= b) ? ((a - b) <= IW'(1)) : ((b - a) <= IW'(1));
    end
    return nb;
  endfunction

  logic [JW-1:0] t;
  logic [VW-1:0] ref_vec;
  logic [CW-1:0] ref_dens;
  logic          ref_head;
  logic [CW-1:0] best [J];

  assign ref_vec  = vec[t];
  assign ref_dens = dens[t];
  assign ref_head = (bin[t] == t);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < J; j++) begin
        parent[j] <= '0;
        best[j]   <= '0;
      end
    end else if (start && !busy) begin
      for (int j = 0; j < J; j++) begin
        parent[j] <= bin[j];
        best[j]   <= dens[j];
      end
    end else if (busy && ref_head) begin
      for (int j = 0; j < J; j++) begin
        if (ref_dens > best[j] && is_neighbor(ref_vec, vec[j])) begin
          parent[j] <= t;
          best[j]   <= ref_dens;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          t    <= '0;
        end
      end else if (t == JW'(num_vec - 1'b1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        t <= t + 1'b1;
      end
    end
  end

endmodule
