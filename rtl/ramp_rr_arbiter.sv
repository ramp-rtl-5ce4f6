// ramp_rr_arbiter -- round-robin arbiter for one crossbar output.
//
// gnt is a one-hot (or zero) pick among req, starting the search just after
// the last requester that was granted and accepted. The pointer advances only
// when adv is high (the granted packet was taken). A grant that was not
// taken is locked: it stays on the same requester until adv, so an output
// never swaps its packet while it waits (requesters hold their requests).
// Combinational grant, registered pointer and lock.
module ramp_rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         adv,
  output logic [N-1:0] gnt
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;
  logic          locked;
  logic [N-1:0]  pick, gnt_q;

  always_comb begin
    pick = '0;
    for (int unsigned i = 1; i <= N; i++) begin
      if (req[IW'((32'(last) + i) % N)] && pick == '0) pick[IW'((32'(last) + i) % N)] = 1'b1;
    end
    gnt = locked ? gnt_q : pick;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      gnt_q  <= '0;
    end else begin
      locked <= (gnt != '0) && !adv;
      gnt_q  <= gnt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= IW'(N - 1);
    else if (adv && gnt != '0) begin
      for (int unsigned i = 0; i < N; i++)
        if (gnt[i]) last <= IW'(i);
    end
  end

endmodule
