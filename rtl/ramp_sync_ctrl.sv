// ramp_sync_ctrl -- phase controller of the RAMP emulator.
//
// Emulating one RTL cycle takes two phases: every core evaluates its share
// of the combinational logic (compute), then the new register values are
// exchanged over the network (sync). The controller runs n_rtl_cycles such
// cycles after a run pulse:
//   start_comp pulse -> wait until every core reports comp_done
//   start_sync pulse -> wait until every core reports sync_done and the ring
//                       holds no packet -> next RTL cycle
// After the last cycle it pulses finish and returns to idle. Both waits are
// global barriers (an AND of per-cluster flags). It also counts the RTL
// cycles done and the accelerator cycles spent in each phase. The
// compute/sync alternation follows the RAMP paper; the barrier handshake is
// this design's choice.
module ramp_sync_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  logic [31:0] n_rtl_cycles,
  input  logic        all_comp_done,
  input  logic        all_sync_done,
  input  logic        net_idle,
  output logic        start_comp,
  output logic        start_sync,
  output logic        finish,
  output logic        busy,
  output logic [31:0] rtl_cycle,
  output logic [31:0] comp_cycles,
  output logic [31:0] sync_cycles
);

  typedef enum logic [2:0] {C_IDLE, C_CSTART, C_CWAIT, C_SSTART, C_SWAIT} cstate_e;
  cstate_e     st;
  logic [31:0] target;

  assign start_comp = (st == C_CSTART);
  assign start_sync = (st == C_SSTART);
  assign busy       = (st != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= C_IDLE;
      target      <= '0;
      rtl_cycle   <= '0;
      comp_cycles <= '0;
      sync_cycles <= '0;
      finish      <= 1'b0;
    end else begin
      finish <= 1'b0;
      if (st == C_CSTART || st == C_CWAIT) comp_cycles <= comp_cycles + 1;
      if (st == C_SSTART || st == C_SWAIT) sync_cycles <= sync_cycles + 1;
      unique case (st)
        C_IDLE: if (run && n_rtl_cycles != '0) begin
          st          <= C_CSTART;
          target      <= n_rtl_cycles;
          rtl_cycle   <= '0;
          comp_cycles <= '0;
          sync_cycles <= '0;
        end
        C_CSTART: st <= C_CWAIT;
        C_CWAIT:  if (all_comp_done) st <= C_SSTART;
        C_SSTART: st <= C_SWAIT;
        C_SWAIT:  if (all_sync_done && net_idle) begin
          rtl_cycle <= rtl_cycle + 1;
          if (rtl_cycle + 1 == target) begin
            st     <= C_IDLE;
            finish <= 1'b1;
          end else begin
            st <= C_CSTART;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
