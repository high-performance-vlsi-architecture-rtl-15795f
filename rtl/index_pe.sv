// Index processing element: histogram cell index of one feature dimension.
//
// INDEX = (F - MIN) / CS, computed by a parallel restoring divider that produces
// only the three most significant quotient bits: three subtract-and-restore stages
// of CS*4, CS*2 and CS. The stored index is zero based (0..Q-1), i.e. the cell
// number of the histogram equation minus one. One PE per dimension; it takes one
// sample per cycle (valid) and registers the index, with idx_valid one cycle later.
// A dividend of 8*CS or more (not possible for data inside the measured range)
// saturates at 7.
module index_pe #(
  parameter int unsigned W = cluster_pkg::FEAT_W
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                valid,
  input  logic signed [W-1:0]                 f,
  input  logic signed [W-1:0]                 min_i,
  input  logic [W:0]                          cs_i,
  output logic [cluster_pkg::IDX_W-1:0]       idx_q,
  output logic                                idx_valid
);

  localparam int unsigned RW = W + 4;   // remainder width: room for CS*4 and a sign bit

  logic [W:0]   dividend;
  logic [RW-1:0] rem  [4];
  logic [RW-1:0] trial[3];
  logic [2:0]   quot;

  always_comb begin
    dividend = (W+1)'(f) - (W+1)'(min_i);
    rem[0]   = RW'(dividend);
    for (int s = 0; s < 3; s++) begin
      // stage s produces quotient bit 2-s: subtract CS << (2-s), restore if negative
      trial[s]     = rem[s] - (RW'(cs_i) << (2 - s));
      quot[2 - s]  = !trial[s][RW-1];
      rem[s + 1]   = trial[s][RW-1] ? rem[s] : trial[s];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q     <= '0;
      idx_valid <= 1'b0;
    end else begin
      idx_valid <= valid;
      if (valid) idx_q <= quot;
    end
  end

endmodule
