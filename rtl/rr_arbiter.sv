// Round-robin arbiter.
//
// Grants one of N requesters. The search for the next grant starts one place
// after the requester that was granted last, so every requester is served
// within N grants: this is the bounded-delay arbitration the shared memory bus
// of the system uses, and the cache uses the same unit for the path that its
// cache controllers share towards SDRAM.
//
// Interface: `req` is a request vector; `grant` is a one-hot (or zero) vector,
// combinational from `req` and the stored pointer. Pulse `accept` in the cycle
// a grant is taken; the pointer then moves to the granted requester.
// Reset puts the pointer at the last requester, so requester 0 wins first.
// The pointer and its update are this design's choice; the document names
// only the round-robin policy.
module rr_arbiter #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         accept,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q;
  logic [IW-1:0] winner;
  logic          found;

  always_comb begin
    int unsigned idx;
    grant  = '0;
    winner = last_q;
    found  = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(last_q) + k) % N;
      if (!found && req[idx]) begin
        found       = 1'b1;
        winner      = IW'(idx);
        grant[idx]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                last_q <= IW'(N - 1);
    else if (accept && found)  last_q <= winner;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);

endmodule
