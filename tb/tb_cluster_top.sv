// End-to-end testbench of cluster_top at a reduced size (J = 96 vectors of the
// full N = 22 dimensions). Clustered feature frames are generated here: a few
// random centres with noise, so that vectors share bins, neighbouring bins of
// lower density link to denser ones and several peaks appear. Each frame is
// clustered with Q = 3, 5 and 8; the label of every window, the number of
// clusters and the number of bins are compared with the reference model, and the
// frame time with 8J + 17 cycles (start to done). A last run clusters only the
// first 61 vectors of the last frame (num_vec = 61, Q = 3) after the full frames.
// Counted mechanisms: shared bins, links, chains of two or more links, several
// clusters, Q = 3 and Q = 8, and a partial frame; one that never happens is a
// failure.
module tb_cluster_top;
  import cluster_pkg::*;
  import cluster_model_pkg::*;
  localparam int N = 22, J = 96, W = 16, JW = 7, CW = 7;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0] q = 4'd3;
  logic fr_we = 1'b0;
  logic [JW-1:0] fr_waddr = '0, lbl_raddr = '0, lbl_rdata;
  logic [N-1:0][W-1:0] fr_wdata = '0;
  logic busy, done;
  phase_e phase;
  logic [CW-1:0] num_clusters;
  logic [JW:0] num_bins;
  logic [JW:0] num_vec = (JW+1)'(J);
  int n_shared = 0, n_links = 0, n_chains = 0, n_multi = 0, n_q3 = 0, n_q8 = 0, n_part = 0;

  cluster_top #(.N(N), .J(J), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cluster_model m = new(J, N);
    int centres [8][N];
    int cycles, nc, noise;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int frame = 0; frame < 3; frame++) begin
      nc = 3 + frame * 2;
      noise = 2000 + frame * 1500;
      for (int c = 0; c < nc; c++)
        for (int k = 0; k < N; k++) centres[c][k] = $urandom_range(0, 50000) - 25000;
      for (int v = 0; v < J; v++) begin
        // skewed cluster sizes make densities differ
        automatic int c = ($urandom_range(0, 99) < 40) ? 0 : $urandom_range(0, nc - 1);
        for (int k = 0; k < N; k++) begin
          automatic int x = centres[c][k] + $urandom_range(0, 2 * noise) - noise;
          if (x > 32767) x = 32767;
          if (x < -32768) x = -32768;
          m.feat[v][k] = x;
        end
      end
      // load the frame
      for (int v = 0; v < J; v++) begin
        @(negedge clk);
        fr_we = 1'b1;
        fr_waddr = JW'(v);
        for (int k = 0; k < N; k++) fr_wdata[k] = W'(m.feat[v][k]);
      end
      @(negedge clk);
      fr_we = 1'b0;
      for (int qi = 0; qi < 3; qi++) begin
        automatic int qq = (qi == 0) ? 3 : (qi == 1) ? 5 : 8;
        m.run(qq);
        q = 4'(qq);
        @(negedge clk);
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        cycles = 1;
        while (!done) begin @(negedge clk); cycles++; end
        check(cycles == 8 * J + 17,
              $sformatf("frame took %0d cycles, expected %0d", cycles, 8 * J + 17));
        check(int'(num_clusters) == m.num_clusters,
              $sformatf("q=%0d clusters %0d expected %0d", qq, num_clusters, m.num_clusters));
        check(int'(num_bins) == m.num_bins, $sformatf("q=%0d bins %0d expected %0d", qq, num_bins, m.num_bins));
        for (int v = 0; v < J; v++) begin
          lbl_raddr = JW'(v);
          @(negedge clk);
          check(int'(lbl_rdata) == m.label[v], $sformatf("q=%0d window %0d label %0d expected %0d", qq, v, lbl_rdata, m.label[v]));
        end
        $display("frame %0d q=%0d: bins=%0d links=%0d depth=%0d clusters=%0d cycles=%0d",
                 frame, qq, num_bins, m.num_links, m.max_depth, num_clusters, cycles);
        if (num_bins < J) n_shared++;
        if (m.num_links > 0) n_links++;
        if (m.max_depth >= 2) n_chains++;
        if (num_clusters > 1) n_multi++;
        if (qq == 3) n_q3++;
        if (qq == 8) n_q8++;
      end
    end
    // partial frame: the first NP vectors of the frame still in memory
    begin
      localparam int NP = 61;
      cluster_model mp = new(NP, N);
      for (int v = 0; v < NP; v++) for (int k = 0; k < N; k++) mp.feat[v][k] = m.feat[v][k];
      mp.run(3);
      q = 4'd3;
      num_vec = (JW+1)'(NP);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles == 8 * NP + 17,
            $sformatf("partial frame took %0d cycles, expected %0d", cycles, 8 * NP + 17));
      check(int'(num_clusters) == mp.num_clusters,
            $sformatf("partial clusters %0d expected %0d", num_clusters, mp.num_clusters));
      check(int'(num_bins) == mp.num_bins, $sformatf("partial bins %0d expected %0d", num_bins, mp.num_bins));
      for (int v = 0; v < NP; v++) begin
        lbl_raddr = JW'(v);
        @(negedge clk);
        check(int'(lbl_rdata) == mp.label[v], $sformatf("partial window %0d label %0d expected %0d", v, lbl_rdata, mp.label[v]));
      end
      $display("partial frame of %0d: bins=%0d links=%0d clusters=%0d cycles=%0d",
               NP, num_bins, mp.num_links, num_clusters, cycles);
      if (mp.num_bins < NP && mp.num_links > 0) n_part++;
    end
    $display("mechanisms: shared_bins=%0d links=%0d chains=%0d multi_cluster=%0d q3=%0d q8=%0d partial=%0d",
             n_shared, n_links, n_chains, n_multi, n_q3, n_q8, n_part);
    check(n_part > 0, "a partial frame");
    check(n_shared > 0, "vectors shared a bin");
    check(n_links > 0, "bins were linked");
    check(n_chains > 0, "a chain of two or more links");
    check(n_multi > 0, "several clusters");
    check(n_q3 > 0 && n_q8 > 0, "Q = 3 and Q = 8");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
