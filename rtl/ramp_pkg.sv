// ramp_pkg -- constants and types shared by the RAMP emulator RTL.
//
// RAMP emulates a LUT4 netlist by time-multiplexing it onto small cores.
// Every core owns a 4096-bit state store (128 words x 32 bits) and five
// LUT units; each LUT unit runs its own 512-deep instruction memory.
//
// One LUT instruction (76 bits) is
//   [75:60] truth table, bit i is the output for input value i
//   [59:48] source bit address of input 3
//   [47:36] source bit address of input 2
//   [35:24] source bit address of input 1
//   [23:12] source bit address of input 0
//   [11: 0] destination bit address
// A bit address is {word[6:0], bit[4:0]}. The all-ones address is the null
// destination: a slot that writes there is idle. The field layout is this
// design's choice; it makes the store plus instruction memories of 1296 cores
// total 32.59 MiB, the SRAM capacity quoted for the chip.
//
// In a send step (synchronisation phase) the same 20 source fields name the
// bits gathered into one NoC packet. LUT-0's truth field carries the
// destination core {cluster[7:0], core[7:0]}, LUT-0's destination field the
// destination word and first bit, LUT-1's truth field [4:0] the bit count.
package ramp_pkg;

  localparam int unsigned N_LUTS     = 5;     // LUT units per core
  localparam int unsigned LUT_K      = 4;     // inputs per LUT
  localparam int unsigned N_ARRAYS   = 4;     // replicated 5R1W arrays
  localparam int unsigned N_RPORTS   = 5;     // read ports per array
  localparam int unsigned N_SRC      = N_LUTS * LUT_K;  // 20 read ports
  localparam int unsigned WORD_W     = 32;    // storage word width
  localparam int unsigned WADDR_W    = 7;     // 128 words
  localparam int unsigned BIT_W      = 5;     // bit within a word
  localparam int unsigned BADDR_W    = WADDR_W + BIT_W;  // 12
  localparam int unsigned TT_W       = 16;
  localparam int unsigned INSTR_W    = TT_W + (LUT_K + 1) * BADDR_W;  // 76
  localparam int unsigned LEN_W      = 5;     // up to 20 bits per packet

  typedef struct packed {
    logic [WADDR_W-1:0] word;
    logic [BIT_W-1:0]   bitpos;
  } baddr_t;

  localparam baddr_t NULL_BADDR = '1;

  typedef struct packed {
    logic [TT_W-1:0] tt;
    baddr_t [LUT_K-1:0] src;   // src[k] feeds LUT input k
    baddr_t          dst;
  } lut_instr_t;

  // One-flit NoC packet carrying up to 20 register bits.
  typedef struct packed {
    logic [7:0]         dst_cluster;
    logic [7:0]         dst_core;
    logic [WADDR_W-1:0] word;
    logic [BIT_W-1:0]   offset;
    logic [LEN_W-1:0]   len;
    logic [N_SRC-1:0]   data;
  } noc_pkt_t;

  // Host write targets.
  typedef enum logic [2:0] {
    HSEL_STORE = 3'd0,   // storage word (32 bits of host_wdata)
    HSEL_IMEM0 = 3'd1,   // LUT-0 .. LUT-4 instruction memories: 1..5
    HSEL_STEPS = 3'd6    // {n_send[9:0], n_comp[9:0]}
  } host_sel_e;

  typedef enum logic [1:0] {
    PH_IDLE    = 2'd0,
    PH_COMPUTE = 2'd1,
    PH_SYNC    = 2'd2
  } phase_e;

endpackage
