// tb_ramp_storage -- the replicated store must behave as one memory with 20
// read ports: random masked writes go to all four arrays, and every port,
// whichever array serves it, returns the reference word one cycle later.
module tb_ramp_storage;
  import ramp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we;
  logic [6:0] waddr;
  logic [WORD_W-1:0] wmask, wdata;
  logic [N_SRC-1:0][6:0] raddr;
  logic [N_SRC-1:0][WORD_W-1:0] rdata;
  logic [WORD_W-1:0] ref_mem [128];
  logic [N_SRC-1:0][6:0] ra_q;
  int checks = 0, failures = 0;

  ramp_storage dut (.*);

  initial begin
    we = 1; wmask = '1; raddr = '0;
    for (int a = 0; a < 128; a++) begin
      waddr = 7'(a); wdata = $urandom; ref_mem[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int t = 0; t < 2000; t++) begin
      for (int p = 0; p < N_SRC; p++) raddr[p] = 7'($urandom);
      ra_q = raddr;
      we = ($urandom_range(0, 1) == 1);
      waddr = 7'($urandom); wmask = $urandom; wdata = $urandom;
      // reads of other words see the old contents
      for (int p = 0; p < N_SRC; p++) if (raddr[p] == waddr) raddr[p] = raddr[p] + 1;
      ra_q = raddr;
      @(posedge clk); #1;
      for (int p = 0; p < N_SRC; p++) begin
        checks++;
        if (rdata[p] !== ref_mem[ra_q[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d addr %0d: %h vs %h", p, ra_q[p], rdata[p], ref_mem[ra_q[p]]);
        end
      end
      if (we) ref_mem[waddr] = (ref_mem[waddr] & ~wmask) | (wdata & wmask);
    end
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
