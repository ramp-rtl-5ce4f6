// tb_ramp_crossbar -- a 4-core crossbar (cluster 1) with random traffic on
// all five inputs, random output backpressure. Every packet carries a unique
// tag; the test checks that it leaves on the right output (its core, or the
// ring port for another cluster), exactly once, in order per input/output
// pair, that conflicts occur, and that all packets are delivered.
module tb_ramp_crossbar;
  import ramp_pkg::*;
  localparam int NC = 4, NP = NC + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] cluster_id = 8'd1;
  logic [NP-1:0] in_valid = '0, in_ready, out_valid, out_ready = '0;
  noc_pkt_t [NP-1:0] in_pkt, out_pkt;
  int checks = 0, failures = 0, sent = 0, got = 0, n_conf = 0;
  int seq [NP];
  logic [NP-1:0] acc;
  int last_seen [NP][NP];   // [in][out] last tag sequence seen

  ramp_crossbar #(.N_CORES(NC)) dut (.*);

  function automatic int route(noc_pkt_t p);
    return (p.dst_cluster == 8'd1) ? int'(p.dst_core) : NC;
  endfunction

  function automatic noc_pkt_t mk(int i);
    noc_pkt_t p;
    p = '0;
    p.dst_cluster = (i == NC) ? 8'd1 : 8'($urandom_range(0, 2));
    p.dst_core    = 8'($urandom_range(0, NC - 1));
    p.data        = 20'((i << 16) | (seq[i] & 16'hffff));
    return p;
  endfunction

  initial begin
    for (int i = 0; i < NP; i++) begin
      seq[i] = 0;
      for (int o = 0; o < NP; o++) last_seen[i][o] = -1;
      in_pkt[i] = mk(i);
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < NP; i++) if (!in_valid[i] && t < 2900) in_valid[i] = 1'($urandom);
      for (int o = 0; o < NP; o++) out_ready[o] = ($urandom_range(0, 99) < 60);
      #1;
      for (int o = 0; o < NP; o++) begin
        int src, sq, c;
        c = 0;
        for (int i = 0; i < NP; i++) if (in_valid[i] && route(in_pkt[i]) == o) c++;
        if (c > 1) n_conf++;
        if (out_valid[o] && out_ready[o]) begin
          src = int'(out_pkt[o].data) >> 16;
          sq  = int'(out_pkt[o].data) & 16'hffff;
          got++;
          checks++;
          if (route(out_pkt[o]) != o || sq <= last_seen[src][o]) begin
            failures++; $display("FAIL output %0d packet from %0d seq %0d", o, src, sq);
          end
          last_seen[src][o] = sq;
        end
      end
      acc = in_valid & in_ready;
      @(posedge clk);
      #1;
      for (int i = 0; i < NP; i++)
        if (acc[i]) begin
          sent++;
          seq[i]++;
          in_valid[i] = 1'b0;
          in_pkt[i] = mk(i);
        end
    end
    checks++;
    if (sent != got || sent < 1000) begin failures++; $display("FAIL sent %0d got %0d", sent, got); end
    checks++;
    if (n_conf == 0) begin failures++; $display("FAIL no conflicts"); end
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
