// Testbench of vector_bank: vectors are written one per cycle at random
// addresses; after each write every entry must match the model.
module tb_vector_bank;
  localparam int J = 50, N = 5, JW = 6, VW = 15;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [JW-1:0] waddr = '0;
  logic [VW-1:0] wdata = '0;
  logic [VW-1:0] vec [J];
  logic [VW-1:0] model [J];

  vector_bank #(.J(J), .N(N)) dut (.*);

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
    for (int j = 0; j < J; j++) model[j] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 200; i++) begin
      automatic int a = $urandom_range(0, J - 1);
      automatic logic [VW-1:0] d = VW'($urandom);
      we <= (i % 4 != 3); waddr <= JW'(a); wdata <= d;
      @(posedge clk);
      if (i % 4 != 3) model[a] = d;
      we <= 1'b0;
      @(negedge clk);
      for (int j = 0; j < J; j++) check(vec[j] == model[j], $sformatf("entry %0d", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
