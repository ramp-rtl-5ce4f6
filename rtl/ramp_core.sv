// ramp_core -- one RAMP computing core.
//
// The core emulates its share of a LUT4 netlist by running the same program
// once per emulated RTL cycle, in two phases:
//
//  * Compute (start_comp): steps 0 .. n_comp-1. In each step the five LUT
//    units each fetch an instruction, read their four input bits from the
//    state store, evaluate, and write the result bit back. Steps are issued
//    one per cycle with no interlock; the compiler orders them by layered
//    topological sort so that a step only reads bits written by earlier
//    steps. A LUT slot whose destination is the null address is idle.
//  * Sync (start_sync): steps n_comp .. n_comp+n_send-1. The same read ports
//    and bit muxes now gather up to 20 scattered register bits into one NoC
//    packet (see ramp_pkg for the encoding) that is queued for the network.
//    Packets arriving from the network are written into the store through
//    the same write port the LUT results use.
//
// Pipeline (one step per cycle): F fetch instruction -> R read store ->
// E select bits, evaluate LUTs -> W write. The result written in W is
// forwarded to the step in E, and the store returns new data on a read of
// the word being written, so a step may use the results of the step right
// before it. All LUTs of a step must write into one word (single write
// port); the lowest non-idle LUT names the word.
//
// Sync steps stall (not issued) while the send queue could overflow.
// comp_done / sync_done stay high once the phase has drained, until the next
// start pulse; finish returns a core that has completed its sync phase to
// idle. The host loads the store, the instruction memories and the
// step counts only while the core is idle; host reads use read port 0.
//
// The phase structure, LUT count, depths and the reuse of read circuitry for
// sending follow the RAMP paper; the pipeline, forwarding, instruction and
// packet encodings and the send queue are this design's choices.
module ramp_core
  import ramp_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH      = 512,
  parameter int unsigned SRAM_DEPTH      = 128,
  parameter int unsigned SEND_FIFO_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // phase control
  input  logic                 start_comp,
  input  logic                 start_sync,
  input  logic                 finish,
  output logic                 comp_done,
  output logic                 sync_done,
  // NoC out
  output logic                 tx_valid,
  input  logic                 tx_ready,
  output noc_pkt_t             tx_pkt,
  // NoC in (always accepted)
  input  logic                 rx_valid,
  output logic                 rx_ready,
  input  noc_pkt_t             rx_pkt,
  // host port
  input  logic                 host_we,
  input  host_sel_e            host_sel,
  input  logic [8:0]           host_addr,
  input  logic [INSTR_W-1:0]   host_wdata,
  input  logic [WADDR_W-1:0]   host_rd_addr,
  output logic [WORD_W-1:0]    host_rdata,
  // events, one pulse per occurrence
  output logic                 ev_fwd,
  output logic                 ev_stall
);

  localparam int unsigned PCW = $clog2(IMEM_DEPTH + 1);
  localparam int unsigned IAW = $clog2(IMEM_DEPTH);
  localparam int unsigned FCW = $clog2(SEND_FIFO_DEPTH + 1);

  typedef enum logic [2:0] {S_IDLE, S_COMP, S_CDONE, S_SYNC, S_SDONE} state_e;

  state_e          state;
  logic [PCW-1:0]  pc, n_comp, n_send, pc_end;

  // ---------------------------------------------------------------- issue
  logic            issue;
  logic            issue_send;
  logic [FCW-1:0]  fifo_count;
  logic [1:0]      sends_in_flight;
  logic            r_valid, r_send, e_valid, e_send;
  logic            w_valid;             // W stage: write to the store
  logic [WADDR_W-1:0] w_word;
  logic [WORD_W-1:0]  w_mask, w_data;

  assign pc_end = (state == S_SYNC) ? n_comp + n_send : n_comp;
  wire  room    = (32'(fifo_count) + 32'(sends_in_flight)) < SEND_FIFO_DEPTH;
  wire  active  = (state == S_COMP || state == S_SYNC) && pc < pc_end;
  assign issue      = active && (state == S_COMP || room);
  assign issue_send = issue && state == S_SYNC;
  assign ev_stall   = active && !issue;
  assign sends_in_flight = 2'(r_valid && r_send) + 2'(e_valid && e_send);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      pc     <= '0;
      n_comp <= '0;
      n_send <= '0;
    end else begin
      if (host_we && host_sel == HSEL_STEPS && state == S_IDLE) begin
        n_comp <= PCW'(host_wdata[9:0]);
        n_send <= PCW'(host_wdata[19:10]);
      end
      if (issue) pc <= pc + 1'b1;
      unique case (state)
        S_IDLE:  if (start_comp) begin
          state <= S_COMP;
          pc    <= '0;
        end
        S_SDONE: if (start_comp) begin
          state <= S_COMP;
          pc    <= '0;
        end else if (finish) state <= S_IDLE;
        S_COMP:  if (pc == pc_end && !r_valid && !e_valid && !w_valid) state <= S_CDONE;
        S_CDONE: if (start_sync) begin
          state <= S_SYNC;
          pc    <= n_comp;
        end
        S_SYNC:  if (pc == pc_end && !r_valid && !e_valid && fifo_count == '0) state <= S_SDONE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign comp_done = (state == S_CDONE);
  assign sync_done = (state == S_SDONE) && !w_valid;

  // ------------------------------------------------------- F: instruction
  lut_instr_t [N_LUTS-1:0] r_instr;
  for (genvar j = 0; j < N_LUTS; j++) begin : g_imem
    ramp_imem #(.DEPTH(IMEM_DEPTH), .WIDTH(INSTR_W)) u_imem (
      .clk,
      .re    (issue),
      .raddr (IAW'(pc)),
      .rdata (r_instr[j]),
      .we    (host_we && host_sel == host_sel_e'(j + 1) && state == S_IDLE),
      .waddr (IAW'(host_addr)),
      .wdata (host_wdata)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_send  <= 1'b0;
    end else begin
      r_valid <= issue;
      r_send  <= issue_send;
    end
  end

  // ---------------------------------------------------------- R: read store
  localparam int unsigned SAW = $clog2(SRAM_DEPTH);
  logic [N_SRC-1:0][SAW-1:0]    st_raddr;
  logic [N_SRC-1:0][WORD_W-1:0] st_rdata;
  logic                         st_we;
  logic [SAW-1:0]               st_waddr;
  logic [WORD_W-1:0]            st_wmask, st_wdata;

  always_comb begin
    for (int j = 0; j < N_LUTS; j++)
      for (int k = 0; k < LUT_K; k++)
        st_raddr[j*LUT_K + k] = SAW'(r_instr[j].src[k].word);
    if (state == S_IDLE) st_raddr[0] = SAW'(host_rd_addr);
  end

  ramp_storage #(.DEPTH(SRAM_DEPTH)) u_store (
    .clk, .we(st_we), .waddr(st_waddr), .wmask(st_wmask), .wdata(st_wdata),
    .raddr(st_raddr), .rdata(st_rdata)
  );
  assign host_rdata = st_rdata[0];

  lut_instr_t [N_LUTS-1:0] e_instr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid <= 1'b0;
      e_send  <= 1'b0;
    end else begin
      e_valid <= r_valid;
      e_send  <= r_send;
    end
  end
  always_ff @(posedge clk) if (r_valid) e_instr <= r_instr;

  // ------------------------------------------------- E: select and evaluate

  baddr_t [N_SRC-1:0]   e_src;
  logic   [N_SRC-1:0]   e_bits, e_hit;
  always_comb
    for (int j = 0; j < N_LUTS; j++)
      for (int k = 0; k < LUT_K; k++)
        e_src[j*LUT_K + k] = e_instr[j].src[k];

  ramp_mux_array u_mux (
    .rdata(st_rdata), .src(e_src),
    .fw_we(w_valid), .fw_word(w_word), .fw_mask(w_mask), .fw_data(w_data),
    .bits(e_bits), .fwd_hit(e_hit)
  );
  assign ev_fwd = e_valid && !e_send && (e_hit != '0);

  logic [N_LUTS-1:0] e_res, e_live;
  for (genvar j = 0; j < N_LUTS; j++) begin : g_lut
    ramp_lut4 u_lut (.tt(e_instr[j].tt), .in(e_bits[j*LUT_K +: LUT_K]), .out(e_res[j]));
    assign e_live[j] = e_instr[j].dst != NULL_BADDR;
  end

  // Write request of a compute step.
  logic               c_we;
  logic [WADDR_W-1:0] c_word;
  logic [WORD_W-1:0]  c_mask, c_data;
  always_comb begin
    c_we   = 1'b0;
    c_word = '0;
    c_mask = '0;
    c_data = '0;
    for (int j = N_LUTS - 1; j >= 0; j--)
      if (e_live[j]) c_word = e_instr[j].dst.word;
    for (int j = 0; j < N_LUTS; j++)
      if (e_live[j]) begin
        c_we = 1'b1;
        c_mask[e_instr[j].dst.bitpos] = 1'b1;
        c_data[e_instr[j].dst.bitpos] = e_res[j];
      end
    c_we = c_we && e_valid && !e_send;
  end

  // Packet of a sync step.
  noc_pkt_t s_pkt;
  always_comb begin
    s_pkt.dst_cluster = e_instr[0].tt[15:8];
    s_pkt.dst_core    = e_instr[0].tt[7:0];
    s_pkt.word        = e_instr[0].dst.word;
    s_pkt.offset      = e_instr[0].dst.bitpos;
    s_pkt.len         = e_instr[1].tt[LEN_W-1:0];
    s_pkt.data        = e_bits;
  end
  wire s_push = e_valid && e_send && e_live[0];

  logic fifo_in_ready;
  ramp_fifo #(.WIDTH($bits(noc_pkt_t)), .DEPTH(SEND_FIFO_DEPTH)) u_sendq (
    .clk, .rst_n,
    .in_valid(s_push), .in_ready(fifo_in_ready), .in_data(s_pkt),
    .out_valid(tx_valid), .out_ready(tx_ready), .out_data(tx_pkt),
    .count(fifo_count)
  );

  // ---------------------------------------------- W: write-back / NoC in
  assign rx_ready = 1'b1;

  logic [N_SRC+WORD_W-1:0] rx_mask_w, rx_data_w;
  always_comb begin
    rx_mask_w = (N_SRC+WORD_W)'(({N_SRC{1'b1}} >> (N_SRC - 32'(rx_pkt.len)))) << rx_pkt.offset;
    rx_data_w = (N_SRC+WORD_W)'(rx_pkt.data) << rx_pkt.offset;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) w_valid <= 1'b0;
    else        w_valid <= c_we || rx_valid;
  end
  always_ff @(posedge clk) begin
    if (rx_valid) begin
      w_word <= rx_pkt.word;
      w_mask <= rx_mask_w[WORD_W-1:0] & ((rx_pkt.len == '0) ? '0 : '1);
      w_data <= rx_data_w[WORD_W-1:0];
    end else begin
      w_word <= c_word;
      w_mask <= c_mask;
      w_data <= c_data;
    end
  end

  always_comb begin
    st_we    = w_valid;
    st_waddr = SAW'(w_word);
    st_wmask = w_mask;
    st_wdata = w_data;
    if (host_we && host_sel == HSEL_STORE && state == S_IDLE) begin
      st_we    = 1'b1;
      st_waddr = SAW'(host_addr);
      st_wmask = '1;
      st_wdata = host_wdata[WORD_W-1:0];
    end
  end

  // ------------------------------------------------------------ checks
  // Results of one step share one storage word.
  property p_one_word;
    @(posedge clk) disable iff (!rst_n)
      (e_valid && !e_send) |->
        (e_live[0] -> e_instr[0].dst.word == c_word) &&
        (e_live[1] -> e_instr[1].dst.word == c_word) &&
        (e_live[2] -> e_instr[2].dst.word == c_word) &&
        (e_live[3] -> e_instr[3].dst.word == c_word) &&
        (e_live[4] -> e_instr[4].dst.word == c_word);
  endproperty
  a_one_word: assert property (p_one_word);
  // NoC writes and LUT writes never collide.
  a_no_collide: assert property (@(posedge clk) disable iff (!rst_n) !(c_we && rx_valid));
  // The send queue never overflows.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) s_push |-> fifo_in_ready);

endmodule
