// Min-max processing element: minimum and maximum of one feature dimension.
//
// One PE per dimension. A single MIN/MAX cell compares the incoming sample A with
// a reference that the REFS select picks from the two result registers: REFA (the
// MIN register) during the min pass and REFB (the MAX register) during the max
// pass. The passes run one after the other over the J samples, so a frame takes
// 2J samples, and only the register of the current pass is written.
// init presets MIN to the largest and MAX to the smallest value (this preset is
// this design's own choice). A sample with valid high updates the register at the
// next clock edge; min_q/max_q are the register outputs.
module minmax_pe #(
  parameter int unsigned W = cluster_pkg::FEAT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                init,
  input  logic                valid,
  input  logic                refs,   // 0: min pass (REFA), 1: max pass (REFB)
  input  logic signed [W-1:0] a,
  output logic signed [W-1:0] min_q,
  output logic signed [W-1:0] max_q
);

  logic signed [W-1:0] ref_v, cell_min, cell_max;
  logic                a_lt;

  // MIN/MAX cell: one comparator steers A and the reference to the two outputs.
  always_comb begin
    ref_v    = refs ? max_q : min_q;
    a_lt     = a < ref_v;
    cell_min = a_lt ? a : ref_v;
    cell_max = a_lt ? ref_v : a;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      min_q <= '0;
      max_q <= '0;
    end else if (init) begin
      min_q <= {1'b0, {(W-1){1'b1}}};
      max_q <= {1'b1, {(W-1){1'b0}}};
    end else if (valid) begin
      if (!refs) min_q <= cell_min;
      else       max_q <= cell_max;
    end
  end

endmodule
