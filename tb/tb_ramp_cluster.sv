// tb_ramp_cluster -- one cluster of four cores, its ring port looped back to
// itself, emulating a random 64-register, 120-node netlist split over the
// four cores. The testbench plays the phase controller (start_comp, wait for
// all_comp_done, start_sync, wait for all_sync_done and ring_idle) for five
// RTL cycles and then compares every core's register copy, read through the
// host port, with the reference model. It also checks the host decode (a
// write to another cluster's core changes nothing) and that the crossbar saw
// conflicts.
module tb_ramp_cluster;
  import ramp_pkg::*;
  import ramp_tb_pkg::*;
  localparam int NC = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [7:0] cluster_id = 8'd0;
  logic start_comp = 0, start_sync = 0, finish = 0;
  logic all_comp_done, all_sync_done, ring_idle;
  logic up_valid, up_ready, down_valid, down_ready;
  noc_pkt_t up_pkt, down_pkt;
  logic host_we = 0;
  logic [15:0] host_core = '0;
  host_sel_e host_sel = HSEL_STORE;
  logic [8:0] host_addr = '0;
  logic [INSTR_W-1:0] host_wdata = '0;
  logic [WADDR_W-1:0] host_rd_addr = '0;
  logic [7:0] host_rd_core_q = '0;
  logic [WORD_W-1:0] host_rdata;
  logic ev_fwd, ev_stall;

  assign up_valid   = down_valid;
  assign up_pkt     = down_pkt;
  assign down_ready = up_ready;

  ramp_cluster #(.CORES_PER_CLUSTER(NC)) dut (.*);

  int checks = 0, failures = 0, n_conf = 0;
  always_ff @(posedge clk)
    for (int o = 0; o <= NC; o++) if ($countones(dut.u_xbar.req[o]) > 1) n_conf++;

  task automatic hw(int core, host_sel_e sel, int addr, logic [INSTR_W-1:0] d);
    host_core = 16'(core); host_sel = sel; host_addr = 9'(addr); host_wdata = d; host_we = 1;
    @(posedge clk); #1 host_we = 0;
  endtask

  task automatic rd_regs(int core, output logic [63:0] v);
    host_rd_core_q = 8'(core);
    host_rd_addr = 0; @(posedge clk); #1 v[31:0]  = host_rdata;
    host_rd_addr = 1; @(posedge clk); #1 v[63:32] = host_rdata;
  endtask

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    int peers[$];
    logic [63:0] v;
    gen_netlist(64, 120);
    for (int i = 0; i < NC; i++) peers.push_back(i);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (peers[p]) begin
      if (!compile_core(0, p * 16, p * 16 + 16, peers)) begin failures++; $display("FAIL fit"); end
      for (int s = 0; s < n_comp[0] + n_send[0]; s++)
        for (int j = 0; j < N_LUTS; j++) hw(p, host_sel_e'(j + 1), s, prog[0][s][j]);
      hw(p, HSEL_STEPS, 0, INSTR_W'({10'(n_send[0]), 10'(n_comp[0])}));
      v = state_bits();
      hw(p, HSEL_STORE, 0, INSTR_W'(v[31:0]));
      hw(p, HSEL_STORE, 1, INSTR_W'(v[63:32]));
    end
    // a write addressed to cluster 1 must not reach this cluster
    hw(16'h0100, HSEL_STORE, 0, ~INSTR_W'(v[31:0]));
    rd_regs(0, v);
    check("host decode", v, state_bits());
    for (int rc = 0; rc < 5; rc++) begin
      start_comp = 1; @(posedge clk); #1 start_comp = 0;
      while (!all_comp_done) @(posedge clk);
      #1 start_sync = 1; @(posedge clk); #1 start_sync = 0;
      while (!(all_sync_done && ring_idle)) @(posedge clk);
      #1 ref_step();
    end
    finish = 1; @(posedge clk); #1 finish = 0;
    foreach (peers[p]) begin
      rd_regs(p, v);
      check($sformatf("state of core %0d", p), v, state_bits());
    end
    checks++;
    if (n_conf == 0) begin failures++; $display("FAIL no crossbar conflicts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
