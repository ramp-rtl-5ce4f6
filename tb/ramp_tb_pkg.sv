// ramp_tb_pkg -- testbench support: a random LUT4 netlist, its reference
// evaluation, and a small program generator for RAMP cores.
//
// The netlist has NR registers and NN LUT4 nodes; node i reads registers or
// nodes with a lower index, so index order is a topological order. Register r
// loads the value of node dnode[r] at the end of every RTL cycle.
//
// compile_core() produces the program of one core that owns a contiguous
// range of registers [lo, hi): it takes the fan-in cone of those registers
// (nodes shared with other cores' cones are computed again there), orders the
// nodes by layer (layer = 1 + deepest node input, 0 if only registers feed
// it) and packs each layer into steps of five LUTs, a new step at every layer
// boundary. Node results of step s go to storage word 8+s, bit = LUT slot.
// Every core keeps all register values in words 0..1 (register r at word
// r/32, bit r%32). The sync steps then send the core's register bits, in
// chunks of up to 20 that stay within one word, to every peer core.
package ramp_tb_pkg;
  import ramp_pkg::*;

  localparam int MAXN  = 256;
  localparam int MAXR  = 64;
  localparam int MAXP  = 16;   // programs held at once
  localparam int MAXS  = 512;

  int          nr, nn;
  int          nin   [MAXN][4];   // <0: register -1-x, >=0: node
  logic [15:0] ntt   [MAXN];
  int          nlay  [MAXN];
  int          dnode [MAXR];
  logic        state [MAXR];
  logic        nval  [MAXN];

  lut_instr_t  prog  [MAXP][MAXS][N_LUTS];
  int          n_comp[MAXP];
  int          n_send[MAXP];

  function automatic void gen_netlist(int n_regs, int n_nodes);
    nr = n_regs;
    nn = n_nodes;
    for (int i = 0; i < nn; i++) begin
      int mx;
      mx = -1;
      for (int k = 0; k < 4; k++) begin
        if (i == 0 || $urandom_range(0, 99) < 30) begin
          nin[i][k] = -1 - int'($urandom_range(0, nr - 1));
        end else begin
          int lo;
          lo = (i > 12) ? i - 12 : 0;
          nin[i][k] = int'($urandom_range(lo, i - 1));
          if (nlay[nin[i][k]] > mx) mx = nlay[nin[i][k]];
        end
      end
      nlay[i] = mx + 1;
      ntt[i]  = 16'($urandom);
    end
    for (int r = 0; r < nr; r++) begin
      dnode[r] = int'($urandom_range(nn / 2, nn - 1));
      state[r] = 1'($urandom);
    end
  endfunction

  function automatic logic src_val(int s);
    return (s < 0) ? state[-1 - s] : nval[s];
  endfunction

  // One RTL cycle of the reference model.
  function automatic void ref_step();
    logic nxt [MAXR];
    for (int i = 0; i < nn; i++) begin
      logic [3:0] a;
      for (int k = 0; k < 4; k++) a[k] = src_val(nin[i][k]);
      nval[i] = ntt[i][a];
    end
    for (int r = 0; r < nr; r++) nxt[r] = nval[dnode[r]];
    for (int r = 0; r < nr; r++) state[r] = nxt[r];
  endfunction

  function automatic logic [63:0] state_bits();
    logic [63:0] v;
    v = '0;
    for (int r = 0; r < nr; r++) v[r] = state[r];
    return v;
  endfunction

  function automatic baddr_t reg_addr(int r);
    baddr_t a;
    a.word   = WADDR_W'(r / 32);
    a.bitpos = BIT_W'(r % 32);
    return a;
  endfunction

  // Program slot p for a core owning registers [lo, hi); peers are global
  // core ids {cluster, core}. Returns 0 if the program does not fit.
  function automatic bit compile_core(int p, int lo, int hi, int peers[$]);
    bit     need [MAXN];
    baddr_t addr [MAXN];
    int     step, slot, cur_lay, maxlay;
    lut_instr_t nop;
    nop.tt  = '0;
    nop.src = '0;
    nop.dst = NULL_BADDR;
    for (int i = 0; i < nn; i++) need[i] = 0;
    for (int r = lo; r < hi; r++) need[dnode[r]] = 1;
    for (int i = nn - 1; i >= 0; i--)
      if (need[i])
        for (int k = 0; k < 4; k++)
          if (nin[i][k] >= 0) need[nin[i][k]] = 1;
    for (int s = 0; s < MAXS; s++)
      for (int j = 0; j < N_LUTS; j++) prog[p][s][j] = nop;
    maxlay = 0;
    for (int i = 0; i < nn; i++) if (need[i] && nlay[i] > maxlay) maxlay = nlay[i];
    step = -1;
    slot = N_LUTS;
    for (cur_lay = 0; cur_lay <= maxlay; cur_lay++) begin
      slot = N_LUTS;   // a new layer starts a new step
      for (int i = 0; i < nn; i++) begin
        if (!need[i] || nlay[i] != cur_lay) continue;
        if (slot == N_LUTS) begin
          step++;
          slot = 0;
        end
        if (8 + step >= 128) return 0;
        addr[i].word   = WADDR_W'(8 + step);
        addr[i].bitpos = BIT_W'(slot);
        prog[p][step][slot].tt  = ntt[i];
        for (int k = 0; k < 4; k++)
          prog[p][step][slot].src[k] = (nin[i][k] < 0) ? reg_addr(-1 - nin[i][k])
                                                        : addr[nin[i][k]];
        prog[p][step][slot].dst = addr[i];
        slot++;
      end
    end
    n_comp[p] = step + 1;
    n_send[p] = 0;
    foreach (peers[q]) begin
      int r;
      r = lo;
      while (r < hi) begin
        int len, s;
        len = hi - r;
        if (len > N_SRC) len = N_SRC;
        if ((r % 32) + len > 32) len = 32 - (r % 32);
        s = n_comp[p] + n_send[p];
        if (s >= MAXS) return 0;
        for (int b = 0; b < N_SRC; b++)
          prog[p][s][b / LUT_K].src[b % LUT_K] = (b < len) ? addr[dnode[r + b]] : '0;
        prog[p][s][0].tt  = 16'(peers[q]);
        prog[p][s][0].dst = reg_addr(r);
        prog[p][s][1].tt  = 16'(len);
        n_send[p]++;
        r += len;
      end
    end
    return 1;
  endfunction

endpackage
