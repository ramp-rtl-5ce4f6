// ramp_ring_router -- ring stop of one cluster.
//
// The clusters are joined by a unidirectional ring. Each stop buffers the
// incoming link in a small FIFO. A packet at the FIFO head addressed to this
// cluster is ejected into the cluster crossbar; any other packet is passed on
// to the next stop. Packets from the crossbar are injected onto the outgoing
// link only in cycles when no passing packet uses it (through traffic first).
// The ready of the incoming link comes from the FIFO occupancy only, so the
// ready signals do not form a loop around the ring. idle is high when the
// stop holds no packet. The ring between clusters follows the RAMP paper; its
// direction, buffering and priority are this design's choices.
module ramp_ring_router
  import ramp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] cluster_id,
  // from the previous stop
  input  logic       up_valid,
  output logic       up_ready,
  input  noc_pkt_t   up_pkt,
  // to the next stop
  output logic       down_valid,
  input  logic       down_ready,
  output noc_pkt_t   down_pkt,
  // to the crossbar (eject) and from it (inject)
  output logic       ej_valid,
  input  logic       ej_ready,
  output noc_pkt_t   ej_pkt,
  input  logic       inj_valid,
  output logic       inj_ready,
  input  noc_pkt_t   inj_pkt,
  output logic       idle
);

  logic     h_valid, h_ready;
  noc_pkt_t h_pkt;
  logic [$clog2(FIFO_DEPTH+1)-1:0] cnt;

  ramp_fifo #(.WIDTH($bits(noc_pkt_t)), .DEPTH(FIFO_DEPTH)) u_in (
    .clk, .rst_n,
    .in_valid(up_valid), .in_ready(up_ready), .in_data(up_pkt),
    .out_valid(h_valid), .out_ready(h_ready), .out_data(h_pkt),
    .count(cnt)
  );

  wire mine = h_pkt.dst_cluster == cluster_id;
  wire pass = h_valid && !mine;

  assign ej_valid   = h_valid && mine;
  assign ej_pkt     = h_pkt;
  assign down_valid = pass || inj_valid;
  assign down_pkt   = pass ? h_pkt : inj_pkt;
  assign inj_ready  = down_ready && !pass;
  assign h_ready    = mine ? ej_ready : down_ready;
  assign idle       = (cnt == '0);

endmodule
