// ramp_storage -- state store of one RAMP core.
//
// Four identical 5R1W arrays hold the same 128 x 32-bit contents: every write
// is broadcast to all of them, so together they offer 20 read ports from one
// logical memory. Read port p = j*4 + k (LUT j, input k) is served by array
// k, port j. Replication and broadcast writes follow the RAMP paper; the
// port-to-array wiring is this design's choice.
//
// Timing: one-cycle synchronous read, see ramp_sram_5r1w.
module ramp_storage
  import ramp_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic                              clk,
  input  logic                              we,
  input  logic [$clog2(DEPTH)-1:0]          waddr,
  input  logic [WORD_W-1:0]                 wmask,
  input  logic [WORD_W-1:0]                 wdata,
  input  logic [N_SRC-1:0][$clog2(DEPTH)-1:0] raddr,
  output logic [N_SRC-1:0][WORD_W-1:0]      rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  for (genvar k = 0; k < N_ARRAYS; k++) begin : g_arr
    logic [N_RPORTS-1:0][AW-1:0]     ra;
    logic [N_RPORTS-1:0][WORD_W-1:0] rd;
    for (genvar j = 0; j < N_RPORTS; j++) begin : g_port
      assign ra[j] = raddr[j*N_ARRAYS + k];
      assign rdata[j*N_ARRAYS + k] = rd[j];
    end
    ramp_sram_5r1w #(.DEPTH(DEPTH), .WIDTH(WORD_W), .NR(N_RPORTS)) u_arr (
      .clk, .we, .waddr, .wmask, .wdata, .raddr(ra), .rdata(rd)
    );
  end

endmodule
