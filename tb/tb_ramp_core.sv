// tb_ramp_core -- end-to-end test of one core emulating a random netlist.
//
// A random 64-register, 160-node LUT4 netlist is compiled for a single core
// that owns all registers and sends its register updates to itself. The
// testbench plays the phase controller and loops the core's NoC output back
// to its input with random backpressure. After each emulated RTL cycle the
// 64 register bits are read back through the host port and compared with the
// reference model. It also checks that the compute phase takes n_comp plus
// the pipeline depth, 5 cycles in all, and that forwarding and send stalls occur.
module tb_ramp_core;
  import ramp_pkg::*;
  import ramp_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start_comp = 0, start_sync = 0, finish = 0, comp_done, sync_done;
  logic tx_valid, tx_ready, rx_valid, rx_ready;
  noc_pkt_t tx_pkt, rx_pkt;
  logic host_we = 0;
  host_sel_e host_sel = HSEL_STORE;
  logic [8:0] host_addr = '0;
  logic [INSTR_W-1:0] host_wdata = '0;
  logic [WADDR_W-1:0] host_rd_addr = '0;
  logic [WORD_W-1:0]  host_rdata;
  logic ev_fwd, ev_stall;

  int checks = 0, failures = 0, n_fwd = 0, n_stall = 0, n_pkts = 0;
  int backpressure = 0;

  ramp_core dut (.*);

  // loopback with a one-cycle register
  always_ff @(posedge clk) begin
    rx_valid <= rst_n && tx_valid && tx_ready;
    rx_pkt   <= tx_pkt;
    if (rst_n && tx_valid && tx_ready) n_pkts++;
    if (ev_fwd)   n_fwd++;
    if (ev_stall) n_stall++;
  end
  assign tx_ready = (backpressure == 0) || ($urandom_range(0, 99) < 25);

  task automatic hw(host_sel_e sel, int addr, logic [INSTR_W-1:0] d);
    host_sel = sel; host_addr = 9'(addr); host_wdata = d; host_we = 1;
    @(posedge clk); #1 host_we = 0;
  endtask

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [63:0] rd_now();
    return 64'(host_rdata);
  endfunction

  task automatic read_regs(output logic [63:0] v);
    host_rd_addr = 0; @(posedge clk); #1 v[31:0] = host_rdata;
    host_rd_addr = 1; @(posedge clk); #1 v[63:32] = host_rdata;
  endtask

  initial begin
    int cyc;
    int peers[$];
    logic [63:0] v;
    gen_netlist(64, 160);
    // the core is its own peer three times over: more send steps than the
    // send queue holds, so backpressure must stall issue
    repeat (3) peers.push_back(0);
    if (!compile_core(0, 0, 64, peers)) begin
      failures++; $display("FAIL program does not fit");
    end
    $display("program: %0d compute steps, %0d send steps", n_comp[0], n_send[0]);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < n_comp[0] + n_send[0]; s++)
      for (int j = 0; j < N_LUTS; j++) hw(host_sel_e'(j + 1), s, prog[0][s][j]);
    hw(HSEL_STEPS, 0, INSTR_W'({10'(n_send[0]), 10'(n_comp[0])}));
    v = state_bits();
    hw(HSEL_STORE, 0, INSTR_W'(v[31:0]));
    hw(HSEL_STORE, 1, INSTR_W'(v[63:32]));
    read_regs(v);
    check("initial state", v, state_bits());

    for (int rc = 0; rc < 6; rc++) begin
      backpressure = rc % 2;
      start_comp = 1; @(posedge clk); #1 start_comp = 0;
      cyc = 1;
      while (!comp_done) begin @(posedge clk); #1 cyc++; end
      // start pulse, n_comp issue cycles, 3 stages to drain, 1 to report
      check("compute cycles", 64'(cyc), 64'(n_comp[0] + 5));
      start_sync = 1; @(posedge clk); #1 start_sync = 0;
      while (!(sync_done && !rx_valid)) @(posedge clk);
      #1;
      ref_step();
      if (rc == 5) begin
        finish = 1; @(posedge clk); #1 finish = 0;
        read_regs(v);
        check("state after run", v, state_bits());
      end else begin
        // read the state through the pipeline-free path: peek the store
        v[31:0]  = dut.u_store.g_arr[0].u_arr.mem[0];
        v[63:32] = dut.u_store.g_arr[0].u_arr.mem[1];
        check($sformatf("state after RTL cycle %0d", rc + 1), v, state_bits());
      end
    end
    checks++;
    if (n_fwd == 0)   begin failures++; $display("FAIL no forwarding happened"); end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL no send stall happened"); end
    checks++;
    if (n_pkts != 6 * n_send[0]) begin failures++; $display("FAIL packets %0d", n_pkts); end
    $display("forwards=%0d stalls=%0d packets=%0d", n_fwd, n_stall, n_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
