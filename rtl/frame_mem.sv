// Synchronous memory with one write port and one registered read port.
//
// Used twice by the clustering processor: as the input frame that holds the J
// feature vectors (one vector of N features per word, vector j at address j) and
// as the output matrix that receives the cluster label of every window. A write
// takes effect at the clock edge; rdata shows the word at raddr one cycle after
// raddr is applied. The memory is not reset: it is written before it is read.
// The port set and the read latency are this design's own choices.
module frame_mem #(
  parameter int unsigned WIDTH = cluster_pkg::N_DIM * cluster_pkg::FEAT_W,
  parameter int unsigned DEPTH = cluster_pkg::J_VEC,
  localparam int unsigned AW = cluster_pkg::id_width(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
