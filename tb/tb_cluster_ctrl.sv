// Testbench of cluster_ctrl: stand-in stages answer each start pulse with a done
// pulse a few cycles later. The strobes are checked for count and order: J min
// samples then J max samples, one cell-size load after the last max sample, J
// index samples whose vector-bank writes go to addresses 0..J-1, then the five
// stage starts in dataflow order and one done pulse. Two frames are run.
module tb_cluster_ctrl;
  import cluster_pkg::*;
  localparam int J = 10, JW = 4;
  logic [JW:0] num_vec = (JW+1)'(J);
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [JW-1:0] rd_addr, vec_waddr;
  logic mm_init, mm_valid, mm_refs, cs_load, ix_valid, vec_we;
  logic alloc_start, alloc_done, link_start, link_done, assign_start, assign_done;
  logic group_start, group_done, map_start, map_done, busy, done;
  phase_e phase;
  logic [4:0] starts, dones;
  int log_q [$];   // event codes in order

  cluster_ctrl #(.J(J)) dut (.*);

  assign starts = {map_start, group_start, assign_start, link_start, alloc_start};
  assign {map_done, group_done, assign_done, link_done, alloc_done} = dones;

  always #5 clk = ~clk;

  // stand-in stages: done three cycles after start
  logic [4:0] d1, d2;
  always_ff @(posedge clk) begin
    d1    <= starts;
    d2    <= d1;
    dones <= d2;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // event log: 1 min sample, 2 max sample, 3 cs load, 4 index sample, 5 bank write,
  // 10+k start of stage k, 20 done
  int exp_waddr;
  always @(negedge clk) if (rst_n) begin
    if (mm_valid) log_q.push_back(mm_refs ? 2 : 1);
    if (cs_load) log_q.push_back(3);
    if (ix_valid) log_q.push_back(4);
    if (vec_we) begin
      log_q.push_back(5);
      check(int'(vec_waddr) == exp_waddr, $sformatf("bank write address %0d expected %0d", vec_waddr, exp_waddr));
      exp_waddr++;
    end
    for (int k = 0; k < 5; k++) if (starts[k]) log_q.push_back(10 + k);
    if (done) log_q.push_back(20);
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_q [$];
    dones = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int frame = 0; frame < 2; frame++) begin
      log_q.delete();
      exp_waddr = 0;
      @(negedge clk);
      start = 1'b1;
      #1;
      check(mm_init, "mm_init with start");
      @(negedge clk);
      start = 1'b0;
      while (!done) @(negedge clk);
      @(negedge clk);
      check(!busy && phase == PH_IDLE, "idle after done");
      exp_q.delete();
      repeat (J) exp_q.push_back(1);
      repeat (J) exp_q.push_back(2);
      exp_q.push_back(3);
      // index samples and bank writes interleave, writes one cycle behind
      exp_q.push_back(4);
      repeat (J - 1) begin exp_q.push_back(4); exp_q.push_back(5); end
      exp_q.push_back(5);
      for (int k = 0; k < 5; k++) exp_q.push_back(10 + k);
      exp_q.push_back(20);
      check(log_q.size() == exp_q.size(), $sformatf("%0d events, expected %0d", log_q.size(), exp_q.size()));
      for (int i = 0; i < exp_q.size() && i < log_q.size(); i++)
        check(log_q[i] == exp_q[i], $sformatf("event %0d is %0d, expected %0d", i, log_q[i], exp_q[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
