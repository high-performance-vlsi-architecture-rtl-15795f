// Testbench of frame_mem: random words are written to random addresses and read
// back through the registered read port, one cycle after the address.
module tb_frame_mem;
  localparam int WIDTH = 40, DEPTH = 100, AW = 7;
  int checks = 0, failures = 0;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];

  frame_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

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
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = {$urandom, $urandom};
      we <= 1'b1; waddr <= AW'(a); wdata <= model[a];
      @(posedge clk);
    end
    for (int i = 0; i < 300; i++) begin
      automatic int wa = $urandom_range(0, DEPTH - 1);
      automatic int ra = $urandom_range(0, DEPTH - 1);
      automatic logic [WIDTH-1:0] d = {$urandom, $urandom};
      automatic logic [WIDTH-1:0] exp_d = model[ra];
      we <= (i % 3 == 0); waddr <= AW'(wa); wdata <= d; raddr <= AW'(ra);
      @(posedge clk);
      if (i % 3 == 0) model[wa] = d;
      we <= 1'b0;
      @(negedge clk);
      check(rdata == exp_d, $sformatf("read %0d", ra));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
