// Testbench of ones_compressor at the full size of 24882 inputs and at a small
// size: random bit patterns of several densities, all zeros and all ones, compared
// with a count made here bit by bit.
module tb_ones_compressor;
  localparam int JB = 24882, JS = 10;
  int checks = 0, failures = 0;
  logic [JB-1:0] bits_b;
  logic [JS-1:0] bits_s;
  logic [15:0] count_b;
  logic [3:0]  count_s;

  ones_compressor #(.J(JB)) dut_b (.bits(bits_b), .count(count_b));
  ones_compressor #(.J(JS)) dut_s (.bits(bits_s), .count(count_s));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 24; r++) begin
      automatic int ones_b = 0, ones_s = 0;
      automatic int dens = (r * 7) % 101;   // percent of ones
      for (int i = 0; i < JB; i++) begin
        bits_b[i] = (r == 0) ? 1'b0 : (r == 1) ? 1'b1 : ($urandom_range(0, 99) < dens);
        ones_b += int'(bits_b[i]);
      end
      for (int i = 0; i < JS; i++) begin
        bits_s[i] = (r == 1) ? 1'b1 : (r == 0) ? 1'b0 : 1'($urandom);
        ones_s += int'(bits_s[i]);
      end
      #1;
      check(int'(count_b) == ones_b, $sformatf("J=24882 count %0d expected %0d", count_b, ones_b));
      check(int'(count_s) == ones_s, $sformatf("J=10 count %0d expected %0d", count_s, ones_s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
