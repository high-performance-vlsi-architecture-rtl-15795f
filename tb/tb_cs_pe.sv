// Testbench of cs_pe: for random ranges and every Q from 3 to 8 the registered
// cell size must equal floor(range * ceil(2^17 / Q) / 2^17) + 1, must exceed
// range / Q (so an index never reaches Q) and must not exceed range / Q + 2.
module tb_cs_pe;
  localparam int W = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [3:0] q = 4'd3;
  logic signed [W-1:0] min_i = '0, max_i = '0;
  logic [W:0] cs_q;

  cs_pe #(.W(W)) dut (.*);

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
    longint rng, qinv, exp_cs;
    int lo, hi;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 400; i++) begin
      lo = $urandom_range(0, 65535) - 32768;
      hi = $urandom_range(0, 65535) - 32768;
      if (i == 0) begin lo = -32768; hi = 32767; end
      if (i == 1) begin lo = 100; hi = 100; end
      if (lo > hi) begin automatic int tmp = lo; lo = hi; hi = tmp; end
      for (int qq = 3; qq <= 8; qq++) begin
        q <= 4'(qq); min_i <= W'(lo); max_i <= W'(hi); load <= 1'b1;
        @(posedge clk);
        load <= 1'b0;
        @(negedge clk);
        rng    = hi - lo;
        qinv   = ((longint'(1) << 17) + qq - 1) / qq;
        exp_cs = ((rng * qinv) >> 17) + 1;
        check(cs_q == exp_cs, $sformatf("q=%0d range=%0d cs=%0d expected %0d", qq, rng, cs_q, exp_cs));
        check(longint'(cs_q) * qq > rng, "cs * q > range");
        check(longint'(cs_q) <= rng / qq + 2, "cs <= range / q + 2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
