// Testbench of minmax_pe: a min pass then a max pass over random samples; the
// registers are compared with the minimum and maximum worked out here, and each
// pass must leave the other register alone.
module tb_minmax_pe;
  localparam int W = 16;
  localparam int S = 300;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, valid = 1'b0, refs = 1'b0;
  logic signed [W-1:0] a = '0, min_q, max_q;
  logic signed [W-1:0] data [S];
  int exp_min, exp_max;

  minmax_pe #(.W(W)) dut (.*);

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
    exp_min = 32767; exp_max = -32768;
    for (int i = 0; i < S; i++) begin
      data[i] = W'($urandom_range(0, 40000) - 20000);
      if (data[i] < exp_min) exp_min = data[i];
      if (data[i] > exp_max) exp_max = data[i];
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); init <= 1'b1;
    @(posedge clk); init <= 1'b0;
    // min pass
    for (int i = 0; i < S; i++) begin
      valid <= 1'b1; refs <= 1'b0; a <= data[i];
      @(posedge clk);
    end
    valid <= 1'b0;
    @(posedge clk);
    check(min_q == exp_min, $sformatf("min %0d expected %0d", min_q, exp_min));
    check(max_q == -32768, "max register untouched by the min pass");
    // max pass
    for (int i = 0; i < S; i++) begin
      valid <= 1'b1; refs <= 1'b1; a <= data[i];
      @(posedge clk);
    end
    valid <= 1'b0;
    @(posedge clk);
    check(max_q == exp_max, $sformatf("max %0d expected %0d", max_q, exp_max));
    check(min_q == exp_min, "min register untouched by the max pass");
    // extremes
    @(posedge clk); init <= 1'b1;
    @(posedge clk); init <= 1'b0; valid <= 1'b1; refs <= 1'b0; a <= 16'sh8000;
    @(posedge clk); refs <= 1'b1; a <= 16'sh7fff;
    @(posedge clk); valid <= 1'b0;
    @(posedge clk);
    check(min_q == -32768 && max_q == 32767, "full-scale extremes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
