// ramp_top -- RAMP, a LUT-based multi-core RTL emulation accelerator.
//
// N_CLUSTERS clusters of CORES_PER_CLUSTER cores (36 x 36 = 1296 cores by
// default) are joined by a unidirectional ring; inside a cluster a crossbar
// connects the cores. A phase controller alternates compute and sync phases,
// one pair per emulated RTL cycle, with a global barrier after each.
//
// Host interface (used while busy is low):
//   host_we/host_core/host_sel/host_addr/host_wdata  write a storage word
//     (sel 0), a LUT-j instruction (sel j+1) or the step counts (sel 6) of
//     core host_core = {cluster, core};
//   host_rd_core/host_rd_addr -> host_rdata one cycle later: a storage word.
//   run with n_rtl_cycles starts the emulation; busy falls when done.
// Counters: rtl_cycle, comp_cycles and sync_cycles of the last run, and the
// number of cycles in which any core forwarded a result (fwd_events) or held
// back a send step (stall_events).
//
// The core count, cluster size, crossbar-plus-ring network and the phase
// structure follow the RAMP paper; the per-cluster BRAM it mentions is not
// part of this RTL.
module ramp_top
  import ramp_pkg::*;
#(
  parameter int unsigned N_CLUSTERS        = 36,
  parameter int unsigned CORES_PER_CLUSTER = 36,
  parameter int unsigned IMEM_DEPTH        = 512,
  parameter int unsigned SRAM_DEPTH        = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               host_we,
  input  logic [15:0]        host_core,
  input  host_sel_e          host_sel,
  input  logic [8:0]         host_addr,
  input  logic [INSTR_W-1:0] host_wdata,
  input  logic [15:0]        host_rd_core,
  input  logic [WADDR_W-1:0] host_rd_addr,
  output logic [WORD_W-1:0]  host_rdata,
  input  logic               run,
  input  logic [31:0]        n_rtl_cycles,
  output logic               busy,
  output logic [31:0]        rtl_cycle,
  output logic [31:0]        comp_cycles,
  output logic [31:0]        sync_cycles,
  output logic [31:0]        fwd_events,
  output logic [31:0]        stall_events
);

  localparam int unsigned NCL = N_CLUSTERS;

  logic               start_comp, start_sync, finish;
  logic     [NCL-1:0] cl_comp_done, cl_sync_done, cl_idle, cl_fwd, cl_stall;
  logic     [NCL-1:0] up_valid, up_ready, dn_valid, dn_ready;
  noc_pkt_t [NCL-1:0] up_pkt, dn_pkt;
  logic     [NCL-1:0][WORD_W-1:0] cl_rdata;
  logic     [15:0]    rd_core_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_core_q <= '0;
    else        rd_core_q <= host_rd_core;
  end

  for (genvar c = 0; c < NCL; c++) begin : g_cl
    ramp_cluster #(
      .CORES_PER_CLUSTER(CORES_PER_CLUSTER),
      .IMEM_DEPTH(IMEM_DEPTH),
      .SRAM_DEPTH(SRAM_DEPTH)
    ) u_cl (
      .clk, .rst_n,
      .cluster_id    (8'(c)),
      .start_comp, .start_sync, .finish,
      .all_comp_done (cl_comp_done[c]),
      .all_sync_done (cl_sync_done[c]),
      .ring_idle     (cl_idle[c]),
      .up_valid      (up_valid[c]),
      .up_ready      (up_ready[c]),
      .up_pkt        (up_pkt[c]),
      .down_valid    (dn_valid[c]),
      .down_ready    (dn_ready[c]),
      .down_pkt      (dn_pkt[c]),
      .host_we, .host_core, .host_sel, .host_addr, .host_wdata, .host_rd_addr,
      .host_rd_core_q(rd_core_q[7:0]),
      .host_rdata    (cl_rdata[c]),
      .ev_fwd        (cl_fwd[c]),
      .ev_stall      (cl_stall[c])
    );
    // ring: cluster c feeds cluster c+1
    localparam int unsigned NX = (c + 1) % NCL;
    assign up_valid[NX] = dn_valid[c];
    assign up_pkt[NX]   = dn_pkt[c];
    assign dn_ready[c]  = up_ready[NX];
  end

  assign host_rdata = (32'(rd_core_q[15:8]) < NCL) ? cl_rdata[rd_core_q[15:8]] : '0;

  ramp_sync_ctrl u_ctrl (
    .clk, .rst_n, .run, .n_rtl_cycles,
    .all_comp_done(&cl_comp_done),
    .all_sync_done(&cl_sync_done),
    .net_idle     (&cl_idle),
    .start_comp, .start_sync, .finish,
    .busy, .rtl_cycle, .comp_cycles, .sync_cycles
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_events   <= '0;
      stall_events <= '0;
    end else begin
      if (run && !busy) begin
        fwd_events   <= '0;
        stall_events <= '0;
      end else begin
        if (|cl_fwd)   fwd_events   <= fwd_events + 1;
        if (|cl_stall) stall_events <= stall_events + 1;
      end
    end
  end

endmodule
