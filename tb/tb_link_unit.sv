// Testbench of link_unit: random cell vectors in a small 3-D grid, with bins and
// densities worked out here. Every vector's parent must be the lowest-numbered
// neighbouring bin head of the largest density above its own bin's density, or
// its own bin when there is none; done must come J + 1 cycles after start.
module tb_link_unit;
  localparam int J = 48, N = 3, JW = 6, CW = 6, VW = 9;
  logic [JW:0] num_vec = (JW+1)'(J);
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [VW-1:0] vec [J];
  logic [JW-1:0] bin [J];
  logic [CW-1:0] dens [J];
  logic busy, done;
  logic [JW-1:0] parent [J];
  int links = 0, peaks = 0;

  link_unit #(.J(J), .N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bit near(logic [VW-1:0] a, logic [VW-1:0] b);
    for (int k = 0; k < N; k++) begin
      automatic int d = int'(a[k*3 +: 3]) - int'(b[k*3 +: 3]);
      if (d > 1 || d < -1) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, exp_p, best;
    for (int j = 0; j < J; j++) begin vec[j] = '0; bin[j] = '0; dens[j] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int run = 0; run < 3; run++) begin
      for (int j = 0; j < J; j++)
        for (int k = 0; k < N; k++) vec[j][k*3 +: 3] = 3'($urandom_range(0, 3 + run));
      for (int j = 0; j < J; j++) begin
        automatic int b = -1, c = 0;
        for (int i = 0; i < J; i++) if (vec[i] == vec[j]) begin if (b < 0) b = i; c++; end
        bin[j] = JW'(b); dens[j] = CW'(c);
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles == J + 1, $sformatf("done after %0d cycles", cycles));
      for (int j = 0; j < J; j++) begin
        exp_p = bin[j]; best = dens[j];
        for (int h = 0; h < J; h++) begin
          if (bin[h] == h && near(vec[h], vec[j]) && dens[h] > best) begin
            exp_p = h; best = dens[h];
          end
        end
        check(int'(parent[j]) == exp_p, $sformatf("run %0d vector %0d parent %0d expected %0d", run, j, parent[j], exp_p));
        if (exp_p == j) peaks++;
        else if (bin[j] == j) links++;
      end
    end
    check(links > 0 && peaks > 1, "links and several peaks exercised");
    $display("links=%0d peaks=%0d", links, peaks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
