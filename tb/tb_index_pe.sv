// Testbench of index_pe: random samples inside a random range, with the cell size
// of every Q from 3 to 8. The index must equal the integer quotient
// (f - min) / cs, appear one cycle after the sample with idx_valid, and stay
// below Q. A dividend beyond 8 * cs must saturate at 7.
module tb_index_pe;
  localparam int W = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic signed [W-1:0] f = '0, min_i = '0;
  logic [W:0] cs_i = 17'd1;
  logic [2:0] idx_q;
  logic idx_valid;

  index_pe #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lo, hi, fv, exp_idx;
    longint cs;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 300; i++) begin
      lo = $urandom_range(0, 65535) - 32768;
      hi = $urandom_range(0, 65535) - 32768;
      if (i == 0) begin lo = -32768; hi = 32767; end
      if (lo > hi) begin automatic int tmp = lo; lo = hi; hi = tmp; end
      for (int qq = 3; qq <= 8; qq++) begin
        cs = ((longint'(hi - lo) * (((longint'(1) << 17) + qq - 1) / qq)) >> 17) + 1;
        fv = (i % 7 == 0) ? hi : lo + int'($urandom_range(0, hi - lo));
        min_i <= W'(lo); cs_i <= 17'(cs); f <= W'(fv); valid <= 1'b1;
        @(posedge clk);
        valid <= 1'b0;
        @(negedge clk);
        exp_idx = (fv - lo) / int'(cs);
        check(idx_valid, "idx_valid one cycle after the sample");
        check(idx_q == exp_idx, $sformatf("f=%0d min=%0d cs=%0d idx=%0d expected %0d", fv, lo, cs, idx_q, exp_idx));
        check(idx_q < qq, "index below Q");
        @(negedge clk);
        check(!idx_valid, "idx_valid lasts one cycle");
      end
    end
    // saturation: dividend of 10 * cs
    min_i <= '0; cs_i <= 17'd100; f <= 16'sd1000; valid <= 1'b1;
    @(posedge clk); valid <= 1'b0;
    @(negedge clk);
    check(idx_q == 3'd7, "saturation at 7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
