// Full-size testbench of cluster_top: every parameter at its default (J = 24882
// vectors of N = 22 dimensions, 16-bit features). One clustered frame is
// generated here (16 random centres of skewed popularity, small noise, so that
// clusters straddle cell borders in a few dimensions), written into the frame
// memory and clustered with Q = 4. The label of every window, the number of
// clusters and of bins are compared with the reference model, and the frame time
// with 8J + 17 cycles. A second frame then uses only 961 vectors (num_vec = 961,
// the 31 x 31 windows of a 128 x 128 image), clustered with Q = 6, and is checked
// the same way against 8 * 961 + 17 cycles.
module tb_cluster_full;
  import cluster_pkg::*;
  import cluster_model_pkg::*;
  localparam int N = N_DIM, J = J_VEC, W = FEAT_W, JW = 15, CW = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0] q = 4'd4;
  logic fr_we = 1'b0;
  logic [JW-1:0] fr_waddr = '0, lbl_raddr = '0, lbl_rdata;
  logic [N-1:0][W-1:0] fr_wdata = '0;
  logic busy, done;
  phase_e phase;
  logic [CW-1:0] num_clusters;
  logic [JW:0] num_bins;
  logic [JW:0] num_vec = (JW+1)'(J);

  cluster_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok && failures < 20) $display("FAIL %s", what);
    if (!ok) failures++;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cluster_model m = new(J, N);
    int centres [16][N];
    int cycles;
    for (int c = 0; c < 16; c++)
      for (int k = 0; k < N; k++) centres[c][k] = $urandom_range(0, 56000) - 28000;
    for (int v = 0; v < J; v++) begin
      automatic int c = $urandom_range(0, 15) & $urandom_range(0, 15);  // skewed
      for (int k = 0; k < N; k++) m.feat[v][k] = centres[c][k] + $urandom_range(0, 600) - 300;
    end
    m.run(4);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int v = 0; v < J; v++) begin
      @(negedge clk);
      fr_we = 1'b1;
      fr_waddr = JW'(v);
      for (int k = 0; k < N; k++) fr_wdata[k] = W'(m.feat[v][k]);
    end
    @(negedge clk);
    fr_we = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    check(cycles == 8 * J + 17, $sformatf("frame took %0d cycles, expected %0d", cycles, 8 * J + 17));
    check(int'(num_clusters) == m.num_clusters, $sformatf("clusters %0d expected %0d", num_clusters, m.num_clusters));
    check(int'(num_bins) == m.num_bins, $sformatf("bins %0d expected %0d", num_bins, m.num_bins));
    for (int v = 0; v < J; v++) begin
      lbl_raddr = JW'(v);
      @(negedge clk);
      check(int'(lbl_rdata) == m.label[v], $sformatf("window %0d label %0d expected %0d", v, lbl_rdata, m.label[v]));
    end
    $display("full frame: bins=%0d links=%0d depth=%0d clusters=%0d cycles=%0d",
             num_bins, m.num_links, m.max_depth, num_clusters, cycles);
    // small frame: 961 vectors from 8 other centres
    begin
      localparam int NS = 961;
      cluster_model ms = new(NS, N);
      for (int c = 0; c < 8; c++)
        for (int k = 0; k < N; k++) centres[c][k] = $urandom_range(0, 56000) - 28000;
      for (int v = 0; v < NS; v++) begin
        automatic int c = $urandom_range(0, 7) & $urandom_range(0, 7);
        for (int k = 0; k < N; k++) ms.feat[v][k] = centres[c][k] + $urandom_range(0, 2000) - 1000;
      end
      ms.run(6);
      for (int v = 0; v < NS; v++) begin
        @(negedge clk);
        fr_we = 1'b1;
        fr_waddr = JW'(v);
        for (int k = 0; k < N; k++) fr_wdata[k] = W'(ms.feat[v][k]);
      end
      @(negedge clk);
      fr_we = 1'b0;
      q = 4'd6;
      num_vec = (JW+1)'(NS);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles == 8 * NS + 17, $sformatf("small frame took %0d cycles, expected %0d", cycles, 8 * NS + 17));
      check(int'(num_clusters) == ms.num_clusters, $sformatf("small clusters %0d expected %0d", num_clusters, ms.num_clusters));
      check(int'(num_bins) == ms.num_bins, $sformatf("small bins %0d expected %0d", num_bins, ms.num_bins));
      for (int v = 0; v < NS; v++) begin
        lbl_raddr = JW'(v);
        @(negedge clk);
        check(int'(lbl_rdata) == ms.label[v], $sformatf("small window %0d label %0d expected %0d", v, lbl_rdata, ms.label[v]));
      end
      $display("961-vector frame: bins=%0d links=%0d depth=%0d clusters=%0d cycles=%0d",
               num_bins, ms.num_links, ms.max_depth, num_clusters, cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
