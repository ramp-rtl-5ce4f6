// tb_ramp_mux_array -- random read words, bit addresses and pending writes:
// every port must return the addressed bit, taken from the pending write
// when that bit is under its mask in the same word, else from the read word.
module tb_ramp_mux_array;
  import ramp_pkg::*;
  logic [N_SRC-1:0][WORD_W-1:0] rdata;
  baddr_t [N_SRC-1:0] src;
  logic fw_we;
  logic [WADDR_W-1:0] fw_word;
  logic [WORD_W-1:0] fw_mask, fw_data;
  logic [N_SRC-1:0] bits, fwd_hit;
  int checks = 0, failures = 0, n_hit = 0;

  ramp_mux_array dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      fw_we = 1'($urandom); fw_word = 7'($urandom_range(0, 3));
      fw_mask = $urandom; fw_data = $urandom;
      for (int p = 0; p < N_SRC; p++) begin
        rdata[p] = $urandom;
        src[p].word = 7'($urandom_range(0, 3));
        src[p].bitpos = 5'($urandom);
      end
      #1;
      for (int p = 0; p < N_SRC; p++) begin
        logic e;
        bit hit;
        hit = fw_we && fw_word == src[p].word && ((fw_mask >> src[p].bitpos) & 1) != 0;
        e = hit ? fw_data[src[p].bitpos] : rdata[p][src[p].bitpos];
        if (hit) n_hit++;
        checks++;
        if (bits[p] !== e || fwd_hit[p] !== hit) begin
          failures++;
          if (failures < 10) $display("FAIL port %0d", p);
        end
      end
    end
    checks++;
    if (n_hit == 0) failures++;
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
