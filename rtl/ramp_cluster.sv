// ramp_cluster -- one cluster of RAMP cores.
//
// CORES_PER_CLUSTER cores share a crossbar for traffic inside the cluster;
// the crossbar's extra port connects to the cluster's ring stop for traffic
// to and from other clusters. The cluster also decodes the host port (a core
// is addressed as {cluster, core}) and reduces the cores' phase-done flags
// (AND) and event pulses (OR) for the phase controller. cluster_id is an
// input so that every cluster is the same module.
module ramp_cluster
  import ramp_pkg::*;
#(
  parameter int unsigned CORES_PER_CLUSTER = 36,
  parameter int unsigned IMEM_DEPTH        = 512,
  parameter int unsigned SRAM_DEPTH        = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [7:0]         cluster_id,
  // phase control
  input  logic               start_comp,
  input  logic               start_sync,
  input  logic               finish,
  output logic               all_comp_done,
  output logic               all_sync_done,
  output logic               ring_idle,
  // ring links
  input  logic               up_valid,
  output logic               up_ready,
  input  noc_pkt_t           up_pkt,
  output logic               down_valid,
  input  logic               down_ready,
  output noc_pkt_t           down_pkt,
  // host
  input  logic               host_we,
  input  logic [15:0]        host_core,
  input  host_sel_e          host_sel,
  input  logic [8:0]         host_addr,
  input  logic [INSTR_W-1:0] host_wdata,
  input  logic [WADDR_W-1:0] host_rd_addr,
  input  logic [7:0]         host_rd_core_q,  // core of last cycle's read
  output logic [WORD_W-1:0]  host_rdata,
  // events
  output logic               ev_fwd,
  output logic               ev_stall
);

  localparam int unsigned NC = CORES_PER_CLUSTER;

  logic     [NC:0] x_in_valid, x_in_ready, x_out_valid, x_out_ready;
  noc_pkt_t [NC:0] x_in_pkt, x_out_pkt;
  logic     [NC-1:0] c_comp_done, c_sync_done, c_fwd, c_stall;
  logic     [NC-1:0][WORD_W-1:0] c_rdata;

  for (genvar i = 0; i < NC; i++) begin : g_core
    ramp_core #(.IMEM_DEPTH(IMEM_DEPTH), .SRAM_DEPTH(SRAM_DEPTH)) u_core (
      .clk, .rst_n,
      .start_comp, .start_sync, .finish,
      .comp_done (c_comp_done[i]),
      .sync_done (c_sync_done[i]),
      .tx_valid  (x_in_valid[i]),
      .tx_ready  (x_in_ready[i]),
      .tx_pkt    (x_in_pkt[i]),
      .rx_valid  (x_out_valid[i]),
      .rx_ready  (x_out_ready[i]),
      .rx_pkt    (x_out_pkt[i]),
      .host_we   (host_we && host_core == {cluster_id, 8'(i)}),
      .host_sel, .host_addr, .host_wdata, .host_rd_addr,
      .host_rdata(c_rdata[i]),
      .ev_fwd    (c_fwd[i]),
      .ev_stall  (c_stall[i])
    );
  end

  ramp_crossbar #(.N_CORES(NC)) u_xbar (
    .clk, .rst_n, .cluster_id,
    .in_valid(x_in_valid), .in_ready(x_in_ready), .in_pkt(x_in_pkt),
    .out_valid(x_out_valid), .out_ready(x_out_ready), .out_pkt(x_out_pkt)
  );

  ramp_ring_router u_ring (
    .clk, .rst_n, .cluster_id,
    .up_valid, .up_ready, .up_pkt,
    .down_valid, .down_ready, .down_pkt,
    .ej_valid (x_in_valid[NC]),
    .ej_ready (x_in_ready[NC]),
    .ej_pkt   (x_in_pkt[NC]),
    .inj_valid(x_out_valid[NC]),
    .inj_ready(x_out_ready[NC]),
    .inj_pkt  (x_out_pkt[NC]),
    .idle     (ring_idle)
  );

  assign all_comp_done = &c_comp_done;
  assign all_sync_done = &c_sync_done;
  assign ev_fwd        = |c_fwd;
  assign ev_stall      = |c_stall;
  assign host_rdata    = (32'(host_rd_core_q) < NC) ? c_rdata[host_rd_core_q] : '0;

endmodule
