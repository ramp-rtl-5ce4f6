// tb_ramp_top -- end-to-end test of the RAMP emulator on a reduced array
// (3 clusters x 3 cores).
//
// A random 64-register, 160-node LUT4 netlist is split by register ranges
// over all nine cores (each core computes the fan-in cone of its registers
// and broadcasts their new values to every core). The host port loads the
// programs and the initial state, runs the emulator for 4 and then 3 more
// RTL cycles, and the register state of every core is compared with a
// reference model. The test checks the compute-phase cycle count and counts
// the mechanisms of the design: forwarding between steps, send stalls,
// crossbar conflicts, ring ejection, ring pass-through and injections held
// back by passing ring traffic. A mechanism that never occurs is a failure.
module tb_ramp_top;
  import ramp_pkg::*;
  import ramp_tb_pkg::*;

  localparam int NCL = 3;
  localparam int CPC = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic host_we = 0;
  logic [15:0] host_core = '0, host_rd_core = '0;
  host_sel_e host_sel = HSEL_STORE;
  logic [8:0] host_addr = '0;
  logic [INSTR_W-1:0] host_wdata = '0;
  logic [WADDR_W-1:0] host_rd_addr = '0;
  logic [WORD_W-1:0] host_rdata;
  logic run = 0, busy;
  logic [31:0] n_rtl_cycles = '0, rtl_cycle, comp_cycles, sync_cycles, fwd_events, stall_events;

  ramp_top #(.N_CLUSTERS(NCL), .CORES_PER_CLUSTER(CPC)) dut (.*);

  int checks = 0, failures = 0;
  int n_pass = 0, n_eject = 0, n_inj_held = 0, n_conflict = 0;

  for (genvar c = 0; c < NCL; c++) begin : g_mon
    always_ff @(posedge clk) begin
      if (dut.g_cl[c].u_cl.u_ring.pass && dut.g_cl[c].u_cl.u_ring.down_ready) n_pass++;
      if (dut.g_cl[c].u_cl.u_ring.ej_valid && dut.g_cl[c].u_cl.u_ring.ej_ready) n_eject++;
      if (dut.g_cl[c].u_cl.u_ring.inj_valid && !dut.g_cl[c].u_cl.u_ring.inj_ready) n_inj_held++;
      for (int o = 0; o <= CPC; o++)
        if ($countones(dut.g_cl[c].u_cl.u_xbar.req[o]) > 1) n_conflict++;
    end
  end

  task automatic hw(int core, host_sel_e sel, int addr, logic [INSTR_W-1:0] d);
    host_core = 16'(core); host_sel = sel; host_addr = 9'(addr); host_wdata = d; host_we = 1;
    @(posedge clk); #1 host_we = 0;
  endtask

  task automatic rd_regs(int core, output logic [63:0] v);
    host_rd_core = 16'(core);
    host_rd_addr = 0; @(posedge clk); #1 v[31:0]  = host_rdata;
    host_rd_addr = 1; @(posedge clk); #1 v[63:32] = host_rdata;
  endtask

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    $display("%-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  int peers[$];
  int max_comp;

  task automatic emulate(int n);
    logic [63:0] v;
    n_rtl_cycles = 32'(n); run = 1; @(posedge clk); #1 run = 0;
    while (busy) @(posedge clk);
    #1;
    for (int i = 0; i < n; i++) ref_step();
    check("RTL cycles done", 64'(rtl_cycle), 64'(n));
    // each compute phase: start pulse, max n_comp issue cycles, 3 to drain
    // the pipeline, 1 for the core to report, 1 for the barrier to see it
    check("compute-phase cycles", 64'(comp_cycles), 64'(n * (max_comp + 6)));
    $display("run of %0d RTL cycles: %0d compute + %0d sync accelerator cycles",
             n, comp_cycles, sync_cycles);
    foreach (peers[p]) begin
      rd_regs(peers[p], v);
      check($sformatf("state of core %h", peers[p]), v, state_bits());
    end
  endtask

  initial begin
    int np, lo, hi;
    gen_netlist(64, 160);
    for (int c = 0; c < NCL; c++)
      for (int i = 0; i < CPC; i++) peers.push_back(c * 256 + i);
    np = peers.size();
    max_comp = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    foreach (peers[p]) begin
      logic [63:0] v;
      lo = p * 64 / np;
      hi = (p + 1) * 64 / np;
      if (!compile_core(0, lo, hi, peers)) begin failures++; $display("FAIL fit"); end
      if (n_comp[0] > max_comp) max_comp = n_comp[0];
      for (int s = 0; s < n_comp[0] + n_send[0]; s++)
        for (int j = 0; j < N_LUTS; j++) hw(peers[p], host_sel_e'(j + 1), s, prog[0][s][j]);
      hw(peers[p], HSEL_STEPS, 0, INSTR_W'({10'(n_send[0]), 10'(n_comp[0])}));
      v = state_bits();
      hw(peers[p], HSEL_STORE, 0, INSTR_W'(v[31:0]));
      hw(peers[p], HSEL_STORE, 1, INSTR_W'(v[63:32]));
    end
    emulate(4);
    emulate(3);
    need("compute phases", (comp_cycles != 0) ? 1 : 0);
    need("sync phases", (sync_cycles != 0) ? 1 : 0);
    need("forwarding cycles", fwd_events);
    need("send stall cycles", stall_events);
    need("crossbar conflicts", n_conflict);
    need("ring ejections", n_eject);
    need("ring pass-throughs", n_pass);
    need("ring injections held", n_inj_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
