// ramp_sram_5r1w -- behavioural model of one 5-read / 1-write SRAM array.
//
// This stands in for the multi-port SRAM macro the core is built around
// (128 words x 32 bits, five read ports, one write port, 1.5 GHz). It is
// written as a plain array so it simulates and synthesises to a memory cell.
//
// Timing: reads are synchronous, rdata[p] is valid the cycle after raddr[p].
// A write lands at the clock edge; bits selected by wmask are replaced. A read
// of the word being written in the same cycle returns the new data (this
// model's choice). No reset: contents are loaded through the write port.
module ramp_sram_5r1w #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NR    = 5,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic [WIDTH-1:0]         wmask,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [NR-1:0][AW-1:0]    raddr,
  output logic [NR-1:0][WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= (mem[waddr] & ~wmask) | (wdata & wmask);
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NR; p++) begin
      if (we && raddr[p] == waddr)
        rdata[p] <= (mem[raddr[p]] & ~wmask) | (wdata & wmask);
      else
        rdata[p] <= mem[raddr[p]];
    end
  end

endmodule
