// Testbench of map_back: the J writes must come on consecutive cycles, to
// addresses 0..J-1 in order, each carrying that vector's label; done follows the
// last write.
module tb_map_back;
  localparam int J = 30, JW = 5;
  logic [JW:0] num_vec = (JW+1)'(J);
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [JW-1:0] label [J];
  logic busy, done, we;
  logic [JW-1:0] waddr, wdata;

  map_back #(.J(J)) dut (.*);

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
    int n;
    for (int j = 0; j < J; j++) label[j] = JW'($urandom);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      n = 0;
      forever begin
        if (done) break;
        if (we) begin
          check(int'(waddr) == n, $sformatf("write %0d to address %0d", n, waddr));
          check(wdata == label[n], $sformatf("label of %0d", n));
          n++;
        end else begin
          check(1'b0, "gap between writes");
        end
        @(negedge clk);
      end
      check(n == J, $sformatf("%0d writes", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
