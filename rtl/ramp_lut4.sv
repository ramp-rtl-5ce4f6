// ramp_lut4 -- one LUT evaluation unit of the computing array.
//
// Combinational: out = tt[in], i.e. truth-table bit number {in[3],..,in[0]}.
// The unit holds no configuration of its own; the truth table arrives with
// every instruction, which is what lets one unit emulate a different netlist
// LUT each cycle.
module ramp_lut4 (
  input  logic [15:0] tt,
  input  logic [3:0]  in,
  output logic        out
);
  assign out = tt[in];
endmodule
