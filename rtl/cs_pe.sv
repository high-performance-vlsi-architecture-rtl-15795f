// Cell-size processing element: histogram cell length of one feature dimension.
//
// CS = (MAX - MIN) * Q_inv + 1, with Q_inv = 1/Q read from a small look-up table,
// so the division of the cell-size equation becomes one multiplication. One PE per
// dimension; Q (3..8) is shared by all dimensions. The +1 (one LSB) makes CS a
// little larger than the exact range/Q, so that (f - MIN)/CS stays below Q and the
// index always fits three bits. Q_inv is held with F = W+1 fraction bits and
// rounded up for the same reason; this word length, the rounding and clamping of
// Q to 3..8 are this design's own choices. load captures CS at the next edge.
module cs_pe #(
  parameter int unsigned W   = cluster_pkg::FEAT_W,
  parameter int unsigned Q_W = cluster_pkg::Q_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [Q_W-1:0]      q,
  input  logic signed [W-1:0] min_i,
  input  logic signed [W-1:0] max_i,
  output logic [W:0]          cs_q
);

  localparam int unsigned F = W + 1;   // fraction bits of Q_inv

  logic [F:0]     q_inv;               // F fraction bits, integer bit for headroom
  logic [W:0]     range;
  logic [W+F+1:0] prod;
  logic [W:0]     cs_d;

  // Q_inv LUT: ceil(2^F / Q) for Q = 3..8.
  always_comb begin
    unique case (q)
      4'd0, 4'd1, 4'd2, 4'd3: q_inv = (F+1)'(((2 ** F) + 2) / 3);
      4'd4:                   q_inv = (F+1)'(((2 ** F) + 3) / 4);
      4'd5:                   q_inv = (F+1)'(((2 ** F) + 4) / 5);
      4'd6:                   q_inv = (F+1)'(((2 ** F) + 5) / 6);
      4'd7:                   q_inv = (F+1)'(((2 ** F) + 6) / 7);
      default:                q_inv = (F+1)'(((2 ** F) + 7) / 8);
    endcase
  end

  always_comb begin
    range = (W+1)'(max_i) - (W+1)'(min_i);   // MAX - MIN, never negative after the passes
    prod  = (W+F+2)'(range) * (W+F+2)'(q_inv);
    cs_d  = (W+1)'(prod >> F) + (W+1)'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cs_q <= '0;
    else if (load) cs_q <= cs_d;
  end

endmodule
