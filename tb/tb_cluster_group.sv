// Testbench of cluster_group: random peak sets, every vector's root a random peak.
// num_clusters must equal the number of peaks, each vector's label the rank of
// its root among the peaks, and done must come J + 1 cycles after start.
module tb_cluster_group;
  localparam int J = 40, JW = 6, CW = 6;
  logic [JW:0] num_vec = (JW+1)'(J);
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [JW-1:0] root [J];
  logic [J-1:0] peak;
  logic busy, done;
  logic [JW-1:0] label [J];
  logic [CW-1:0] num_clusters;

  cluster_group #(.J(J)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int peaks [$];
    int cycles, rank;
    for (int j = 0; j < J; j++) root[j] = '0;
    peak = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int run = 0; run < 6; run++) begin
      peaks.delete();
      for (int j = 0; j < J; j++) begin
        peak[j] = (j == 3) || ($urandom_range(0, 6) == 0);
        if (peak[j]) peaks.push_back(j);
      end
      for (int j = 0; j < J; j++) root[j] = peak[j] ? JW'(j) : JW'(peaks[$urandom_range(0, peaks.size() - 1)]);
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles == J + 1, $sformatf("done after %0d cycles", cycles));
      check(int'(num_clusters) == peaks.size(), $sformatf("num_clusters %0d expected %0d", num_clusters, peaks.size()));
      for (int j = 0; j < J; j++) begin
        rank = 0;
        foreach (peaks[p]) if (peaks[p] < int'(root[j])) rank++;
        check(int'(label[j]) == rank, $sformatf("vector %0d label %0d expected %0d", j, label[j], rank));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
