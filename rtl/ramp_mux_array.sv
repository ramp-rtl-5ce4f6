// ramp_mux_array -- bit selection between the state store and the LUTs.
//
// Each of the 20 read ports returns a 32-bit word; the mux array picks the
// bit each LUT input asked for. If the word is being written in the same
// cycle (the previous step's results, or an incoming NoC write) the bits
// under the write mask are taken from the write data instead, so a step can
// consume results of the step right before it. The forwarding path is this
// design's addition. Purely combinational.
module ramp_mux_array
  import ramp_pkg::*;
(
  input  logic [N_SRC-1:0][WORD_W-1:0] rdata,   // words from the store
  input  baddr_t [N_SRC-1:0]           src,     // bit address per port
  input  logic                         fw_we,   // write in flight
  input  logic [WADDR_W-1:0]           fw_word,
  input  logic [WORD_W-1:0]            fw_mask,
  input  logic [WORD_W-1:0]            fw_data,
  output logic [N_SRC-1:0]             bits,
  output logic [N_SRC-1:0]             fwd_hit  // port took forwarded data
);

  always_comb begin
    for (int p = 0; p < N_SRC; p++) begin
      fwd_hit[p] = fw_we && fw_word == src[p].word && fw_mask[src[p].bitpos];
      bits[p]    = fwd_hit[p] ? fw_data[src[p].bitpos] : rdata[p][src[p].bitpos];
    end
  end

endmodule
