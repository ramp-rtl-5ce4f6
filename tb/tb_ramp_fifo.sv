// tb_ramp_fifo -- random pushes and pops against a queue model: order, data,
// count, full (no push accepted at DEPTH entries) and empty.
module tb_ramp_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [7:0] in_data = '0, out_data;
  logic [2:0] count;
  logic [7:0] q[$];
  int checks = 0, failures = 0, n_full = 0;

  ramp_fifo #(.WIDTH(8), .DEPTH(4)) dut (.*);

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      in_valid  = ($urandom_range(0, 99) < 60);
      in_data   = 8'($urandom);
      out_ready = ($urandom_range(0, 99) < 40);
      #1;
      checks++;
      if (in_ready !== (q.size() < 4) || out_valid !== (q.size() > 0) || 32'(count) != q.size()) begin
        failures++; $display("FAIL flags at %0d", t);
      end
      if (out_valid) begin
        checks++;
        if (out_data !== q[0]) begin failures++; $display("FAIL data"); end
      end
      if (!in_ready) n_full++;
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_full == 0) failures++;
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
