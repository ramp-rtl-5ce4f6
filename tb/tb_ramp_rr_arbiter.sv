// tb_ramp_rr_arbiter -- the grant is a single requester, the one found first
// after the last accepted grant in circular order; the pointer moves only on
// adv, a grant not taken stays on its requester, and with every input
// requesting and adv high the grants rotate 0,1,2,3,0...
module tb_ramp_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req = '0, gnt;
  logic adv = 0;
  int last = N - 1, n_lock = 0;
  logic locked = 0;
  logic [N-1:0] prev = '0;
  int checks = 0, failures = 0;

  ramp_rr_arbiter #(.N(N)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0] e;
      req = (t < 8) ? '1 : N'($urandom);
      adv = (t < 8) ? 1'b1 : 1'($urandom);
      if (locked) req = req | prev;
      e = '0;
      if (locked) e = prev;
      else for (int i = 1; i <= N; i++)
        if (e == '0 && req[(last + i) % N]) e[(last + i) % N] = 1'b1;
      #1;
      checks++;
      if (gnt !== e) begin failures++; $display("FAIL t=%0d req=%b gnt=%b exp=%b", t, req, gnt, e); end
      if (t < 8) begin
        checks++;
        if (gnt !== N'(1 << (t % N))) begin failures++; $display("FAIL rotation"); end
      end
      @(posedge clk);
      if (adv && e != '0) for (int i = 0; i < N; i++) if (e[i]) last = i;
      locked = (e != '0) && !adv;
      if (locked) n_lock++;
      prev = e;
      #1;
    end
    checks++;
    if (n_lock == 0) failures++;
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
