// tb_ramp_imem -- fills the 512 x 76 instruction memory, then reads random
// addresses: data must appear one cycle after the address, and the output
// must hold while re is low.
module tb_ramp_imem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic re = 0, we = 0;
  logic [8:0] raddr = '0, waddr = '0;
  logic [75:0] rdata, wdata = '0, hold;
  logic [75:0] ref_mem [512];
  int checks = 0, failures = 0;

  ramp_imem dut (.*);

  initial begin
    for (int a = 0; a < 512; a++) begin
      we = 1; waddr = 9'(a);
      wdata = {12'($urandom), $urandom, $urandom};
      ref_mem[a] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int t = 0; t < 1000; t++) begin
      re = 1; raddr = 9'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[raddr]) begin failures++; $display("FAIL addr %0d", raddr); end
      hold = rdata;
      re = 0; raddr = 9'($urandom);
      @(posedge clk); #1;
      checks++;
      if (rdata !== hold) begin failures++; $display("FAIL hold"); end
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
