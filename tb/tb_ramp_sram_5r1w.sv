// tb_ramp_sram_5r1w -- random masked writes and five-port reads of the 5R1W
// array against a reference array. Checks the one-cycle read latency, the
// per-bit write enable, and that a read of the word being written returns the
// new data.
module tb_ramp_sram_5r1w;
  localparam int D = 128, W = 32, NR = 5;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we;
  logic [6:0] waddr;
  logic [W-1:0] wmask, wdata;
  logic [NR-1:0][6:0] raddr;
  logic [NR-1:0][W-1:0] rdata;
  logic [W-1:0] ref_mem [D];
  logic [NR-1:0][W-1:0] exp_q;
  int checks = 0, failures = 0, n_rdw = 0;

  ramp_sram_5r1w dut (.*);

  initial begin
    we = 1; wmask = '1;
    for (int a = 0; a < D; a++) begin
      waddr = 7'(a); wdata = $urandom; ref_mem[a] = wdata;
      raddr = '0;
      @(posedge clk); #1;
    end
    for (int t = 0; t < 3000; t++) begin
      we    = 1'($urandom);
      waddr = 7'($urandom);
      wmask = $urandom;
      wdata = $urandom;
      for (int p = 0; p < NR; p++)
        raddr[p] = ($urandom_range(0, 3) == 0) ? waddr : 7'($urandom);
      // reference: new data for a same-cycle read of the written word
      for (int p = 0; p < NR; p++) begin
        exp_q[p] = ref_mem[raddr[p]];
        if (we && raddr[p] == waddr) begin
          exp_q[p] = (ref_mem[waddr] & ~wmask) | (wdata & wmask);
          n_rdw++;
        end
      end
      if (we) ref_mem[waddr] = (ref_mem[waddr] & ~wmask) | (wdata & wmask);
      @(posedge clk); #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== exp_q[p]) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d: %h vs %h", p, rdata[p], exp_q[p]);
        end
      end
    end
    checks++;
    if (n_rdw == 0) failures++;
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
