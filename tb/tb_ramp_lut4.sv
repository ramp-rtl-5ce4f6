// tb_ramp_lut4 -- exhaustive test of the LUT4 unit: 200 random truth tables,
// all 16 input values each, against a shift-and-mask reference.
module tb_ramp_lut4;
  logic [15:0] tt;
  logic [3:0]  in;
  logic        out;
  int checks = 0, failures = 0;

  ramp_lut4 dut (.*);

  initial begin
    for (int t = 0; t < 200; t++) begin
      tt = (t == 0) ? 16'h8000 : (t == 1) ? 16'h6996 : 16'($urandom);
      for (int v = 0; v < 16; v++) begin
        in = 4'(v);
        #1;
        checks++;
        if (out !== ((tt >> v) & 16'h1) != 0) begin
          failures++;
          $display("FAIL tt=%h in=%0d out=%b", tt, v, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
