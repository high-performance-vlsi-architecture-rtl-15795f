// Testbench of bin_allocator: vectors drawn from a few values so that many share a
// bin. Every vector's bin must be the lowest-numbered equal vector, its density
// the number of equal vectors, num_bins the number of distinct vectors, and done
// must come num_vec + 1 cycles after start. Later runs check that start clears the
// BINNED flags; the last one uses only the first 23 vectors (num_vec = 23).
module tb_bin_allocator;
  localparam int J = 40, N = 4, JW = 6, CW = 6, VW = 12;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [VW-1:0] vec [J];
  logic busy, done;
  logic [JW-1:0] bin [J];
  logic [CW-1:0] dens [J];
  logic [JW:0] num_bins;
  logic [JW:0] num_vec = (JW+1)'(J);
  int nv;

  bin_allocator #(.J(J), .N(N)) dut (.*);

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
    int cycles, exp_bin, exp_dens, exp_bins;
    for (int j = 0; j < J; j++) vec[j] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int run = 0; run < 4; run++) begin
      nv = (run == 3) ? 23 : J;
      num_vec = (JW+1)'(nv);
      for (int j = 0; j < J; j++) begin
        // two dimensions take 0..1, the others 0..(run)
        for (int k = 0; k < N; k++) vec[j][k*3 +: 3] = 3'($urandom_range(0, (k < 2) ? 1 : run));
      end
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cycles = 1;
      while (!done) begin @(negedge clk); cycles++; end
      check(cycles == nv + 1, $sformatf("done after %0d cycles, expected %0d", cycles, nv + 1));
      exp_bins = 0;
      for (int j = 0; j < nv; j++) begin
        exp_bin = -1; exp_dens = 0;
        for (int i = 0; i < nv; i++) begin
          if (vec[i] == vec[j]) begin
            if (exp_bin < 0) exp_bin = i;
            exp_dens++;
          end
        end
        if (exp_bin == j) exp_bins++;
        check(int'(bin[j]) == exp_bin, $sformatf("run %0d vector %0d bin %0d expected %0d", run, j, bin[j], exp_bin));
        check(int'(dens[j]) == exp_dens, $sformatf("run %0d vector %0d density %0d expected %0d", run, j, dens[j], exp_dens));
      end
      check(int'(num_bins) == exp_bins, $sformatf("num_bins %0d expected %0d", num_bins, exp_bins));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
