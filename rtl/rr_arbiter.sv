// rr_arbiter: round-robin arbiter used by the memory-half switch logic.
//
// Grants at most one of N requesters per cycle (gnt is combinational and
// one-hot or zero). The requester after the last winner has the highest
// priority next time, so no accelerator coupled to a half can be starved.
// The priority index advances on every cycle in which a grant is given.
module rr_arbiter #(
  parameter int N = 4,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  logic [IW-1:0] base, win;   // highest-priority requester, winner
  logic          any;

  always_comb begin
    gnt = '0;
    win = base;
    any = 1'b0;
    for (int k = 0; k < N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(base) + k) % N);
      if (!any && req[idx]) begin
        any      = 1'b1;
        win      = idx;
        gnt[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      base <= '0;
    else if (any)
      base <= IW'((int'(win) + 1) % N);
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_granted_req: assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
