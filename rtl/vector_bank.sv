// Register bank of histogram cell index vectors.
//
// Holds the N x 3-bit cell index vector of each of the J feature vectors. The
// index PEs write one vector per cycle at its vector number; every stored vector
// is visible at once on vec, so that the J allocation PEs can all compare in
// parallel. Cleared by reset; a write shows on vec after the clock edge.
module vector_bank #(
  parameter int unsigned J  = cluster_pkg::J_VEC,
  parameter int unsigned N  = cluster_pkg::N_DIM,
  localparam int unsigned JW = cluster_pkg::id_width(J),
  localparam int unsigned VW = N * cluster_pkg::IDX_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [JW-1:0] waddr,
  input  logic [VW-1:0] wdata,
  output logic [VW-1:0] vec [J]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < J; j++) vec[j] <= '0;
    end else if (we && (32'(waddr) < J)) begin
      vec[waddr] <= wdata;
    end
  end

endmodule
