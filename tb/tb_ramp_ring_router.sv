// tb_ramp_ring_router -- the ring stop of cluster 2 with random incoming
// ring traffic (for cluster 2 or others), random injections and random
// backpressure on both outputs. Checks that packets for cluster 2 are
// ejected and all others passed on, in arrival order, each exactly once;
// that an injection is never taken while a passing packet uses the link;
// and that idle reflects an empty buffer.
module tb_ramp_ring_router;
  import ramp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] cluster_id = 8'd2;
  logic up_valid = 0, up_ready, down_valid, down_ready = 0, ej_valid, ej_ready = 0;
  logic inj_valid = 0, inj_ready, idle;
  noc_pkt_t up_pkt, down_pkt, ej_pkt, inj_pkt;
  noc_pkt_t q_ej[$], q_dn[$];
  logic acc_up, acc_inj;
  int checks = 0, failures = 0, n_prio = 0, n_ej = 0, n_pass = 0, useq = 0, iseq = 0;

  ramp_ring_router dut (.*);

  task automatic check(string w, bit ok);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", w); end
  endtask

  initial begin
    up_pkt = '0; inj_pkt = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      if (!up_valid && t < 3900 && $urandom_range(0, 1) == 1) begin
        up_valid = 1;
        up_pkt = '0;
        up_pkt.dst_cluster = 8'($urandom_range(0, 3));
        up_pkt.data = 20'(useq++);
      end
      if (!inj_valid && t < 3900 && $urandom_range(0, 2) == 0) begin
        inj_valid = 1;
        inj_pkt = '0;
        inj_pkt.dst_cluster = 8'(3);
        inj_pkt.data = 20'(20'h80000 | iseq++);
      end
      down_ready = ($urandom_range(0, 99) < 70);
      ej_ready   = ($urandom_range(0, 99) < 70);
      #1;
      if (down_valid && down_ready) begin
        check("passed packet not for this cluster", down_pkt.dst_cluster != 8'd2);
        if (!down_pkt.data[19]) begin
          check("pass order", q_dn.size() > 0 && q_dn[0] == down_pkt);
          if (q_dn.size() > 0) void'(q_dn.pop_front());
          n_pass++;
        end
      end
      if (ej_valid && ej_ready) begin
        check("ejected packet for this cluster", ej_pkt.dst_cluster == 8'd2);
        check("eject order", q_ej.size() > 0 && q_ej[0] == ej_pkt);
        if (q_ej.size() > 0) void'(q_ej.pop_front());
        n_ej++;
      end
      if (inj_valid && inj_ready) check("injected packet on the link", down_valid && down_pkt == inj_pkt);
      if (inj_valid && !inj_ready && down_ready) n_prio++;
      acc_up  = up_valid && up_ready;
      acc_inj = inj_valid && inj_ready;
      @(posedge clk);
      #1;
      if (acc_up) begin
        if (up_pkt.dst_cluster == 8'd2) q_ej.push_back(up_pkt); else q_dn.push_back(up_pkt);
        up_valid = 0;
      end
      if (acc_inj) inj_valid = 0;
    end
    check("all ring packets delivered", q_ej.size() == 0 && q_dn.size() == 0 && idle);
    check("through traffic had priority at least once", n_prio > 0);
    check("ejections and passes happened", n_ej > 0 && n_pass > 0);
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
