// ramp_crossbar -- intra-cluster crossbar of the RAMP network.
//
// N_CORES core ports plus one ring port (index N_CORES) on each side. A packet
// whose destination cluster is this cluster goes to the output of its
// destination core; any other packet goes to the ring output. Every output
// has a round-robin arbiter, so all outputs can be served in the same cycle
// (one packet per input and per output per cycle). Single-flit packets,
// valid/ready on every port; a packet moves when valid and ready are both
// high. Routing is combinational; the crossbar holds only arbiter pointers.
// The crossbar inside each cluster follows the RAMP paper; the arbitration
// policy and the handshake are this design's choices.
module ramp_crossbar
  import ramp_pkg::*;
#(
  parameter int unsigned N_CORES = 36,
  localparam int unsigned NP     = N_CORES + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [7:0]          cluster_id,
  input  logic     [NP-1:0]   in_valid,
  output logic     [NP-1:0]   in_ready,
  input  noc_pkt_t [NP-1:0]   in_pkt,
  output logic     [NP-1:0]   out_valid,
  input  logic     [NP-1:0]   out_ready,
  output noc_pkt_t [NP-1:0]   out_pkt
);

  // req[o][i]: input i wants output o
  logic [NP-1:0][NP-1:0] req, gnt;

  always_comb begin
    for (int o = 0; o < NP; o++)
      for (int i = 0; i < NP; i++) begin
        if (in_pkt[i].dst_cluster == cluster_id)
          req[o][i] = in_valid[i] && (o < N_CORES) && (32'(in_pkt[i].dst_core) == o);
        else
          req[o][i] = in_valid[i] && (o == N_CORES);
      end
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    ramp_rr_arbiter #(.N(NP)) u_arb (
      .clk, .rst_n, .req(req[o]), .adv(out_ready[o]), .gnt(gnt[o])
    );
    always_comb begin
      out_valid[o] = |gnt[o];
      out_pkt[o]   = '0;
      for (int i = 0; i < NP; i++)
        if (gnt[o][i]) out_pkt[o] = in_pkt[i];
    end
  end

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      in_ready[i] = 1'b0;
      for (int o = 0; o < NP; o++)
        if (gnt[o][i] && out_ready[o]) in_ready[i] = 1'b1;
    end
  end

  // A granted packet is held until its output takes it.
  for (genvar o = 0; o < NP; o++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (out_valid[o] && !out_ready[o]) |=> out_valid[o] && $stable(out_pkt[o]));
  end

endmodule
