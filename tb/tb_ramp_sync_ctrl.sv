// tb_ramp_sync_ctrl -- drives the done flags with random delays and checks
// the phase sequence (start_comp, wait, start_sync, wait) for each RTL
// cycle, that the controller waits for both sync_done and an idle network,
// the finish pulse, and the cycle counters.
module tb_ramp_sync_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run = 0, all_comp_done = 0, all_sync_done = 0, net_idle = 1;
  logic [31:0] n_rtl_cycles = '0, rtl_cycle, comp_cycles, sync_cycles;
  logic start_comp, start_sync, finish, busy;
  int checks = 0, failures = 0, exp_comp = 0, exp_sync = 0, n_finish = 0;

  ramp_sync_ctrl dut (.*);

  task automatic check(string w, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d vs %0d", w, got, exp); end
  endtask

  always @(posedge clk) if (rst_n && finish) n_finish++;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    n_rtl_cycles = 5; run = 1;
    @(posedge clk); #1 run = 0;
    for (int c = 0; c < 5; c++) begin
      int dc, ds, di;
      check("start_comp", int'(start_comp), 1);
      dc = $urandom_range(1, 9);
      ds = $urandom_range(1, 9);
      di = $urandom_range(0, 5);
      @(posedge clk); #1;
      repeat (dc - 1) begin check("no start_sync early", int'(start_sync), 0); @(posedge clk); #1; end
      all_comp_done = 1;
      @(posedge clk); #1 all_comp_done = 0;
      exp_comp += dc + 1;
      check("start_sync", int'(start_sync), 1);
      @(posedge clk); #1;
      net_idle = 0;
      repeat (ds - 1) begin @(posedge clk); #1; end
      all_sync_done = 1;
      repeat (di) begin check("waits for network", int'(start_comp || finish), 0); @(posedge clk); #1; end
      net_idle = 1;
      @(posedge clk); #1 all_sync_done = 0;
      exp_sync += ds + di + 1;
      check("rtl_cycle", int'(rtl_cycle), c + 1);
    end
    check("idle after last cycle", int'(busy), 0);
    check("finish high", int'(finish), 1);
    @(posedge clk); #1;
    check("finish pulses", n_finish, 1);
    check("compute cycles", int'(comp_cycles), exp_comp);
    check("sync cycles", int'(sync_cycles), exp_sync);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
