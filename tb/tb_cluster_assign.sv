// Testbench of cluster_assign: random link forests in which every vector points
// at itself (a peak) or at a vector of higher rank, so that chains run both up and
// down the vector numbers. Every root must be the end of the vector's chain, the
// peak flags must mark the self-linked vectors, and done must come J + 1 cycles
// after start (one sweep).
module tb_cluster_assign;
  localparam int J = 32, JW = 5;
  logic [JW:0] num_vec = (JW+1)'(J);
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [JW-1:0] parent [J];
  logic busy, done;
  logic [JW-1:0] root [J];
  logic [J-1:0] peak;
  int down = 0;

  cluster_assign #(.J(J)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rank [J];
    int order [J];
    int cycles, r;
    for (int j = 0; j < J; j++) parent[j] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int run = 0; run < 8; run++) begin
      // random ranking; each vector links to a random higher-ranked one or itself
      for (int j = 0; j < J; j++) order[j] = j;
      order.shuffle();
      for (int p = 0; p < J; p++) rank[order[p]] = p;
      for (int p = 0; p < J; p++) begin
        automatic int j = order[p];
        if (p == J - 1 || $urandom_range(0, 5) == 0) parent[j] = JW'(j);
        else parent[j] = JW'(order[$urandom_range(p + 1, (p + 3 < J) ? p + 3 : J - 1)]);
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles == J + 1, $sformatf("done after %0d cycles", cycles));
      for (int j = 0; j < J; j++) begin
        r = j;
        while (int'(parent[r]) != r) r = parent[r];
        check(int'(root[j]) == r, $sformatf("run %0d vector %0d root %0d expected %0d", run, j, root[j], r));
        check(peak[j] == (int'(parent[j]) == j), "peak flag");
        if (int'(parent[j]) != j && int'(parent[j]) < j && int'(parent[parent[j]]) != int'(parent[j])) down++;
      end
    end
    check(down > 0, "chains running down the vector numbers occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
