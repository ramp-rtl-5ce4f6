// ramp_imem -- instruction memory of one LUT unit.
//
// 512 instructions of 76 bits (ramp_pkg::lut_instr_t). The sequencer reads
// one instruction per cycle (synchronous, one-cycle latency); the host writes
// instructions through the second port while the emulator is stopped.
// Depth follows the RAMP paper; the width comes from the instruction format
// in ramp_pkg.
module ramp_imem #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 76,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
