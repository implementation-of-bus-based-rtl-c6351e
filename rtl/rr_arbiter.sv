// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters. The search starts just after the previous
// winner, so a requester that has just been served has the lowest priority
// next time and every requester gets an equal share. Combinational grant;
// the priority pointer moves only when `advance` is high (the grant was
// used), so a grant that could not be used is offered again.
//
// Interface: req[N] in; grant[N] one-hot out, grant_idx its index, any_grant
// when some request is granted. Used by the NoC router and the shared bus.
//
// Lint note: the tool reports rst_n as used both asynchronously and
// synchronously; the synchronous use is only the `disable iff` of the
// simulation assertions, the flops themselves all reset asynchronously.
// The loop index `cand` is a 32-bit integer of which only the low bits
// are used; this is intended.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         grant,
  output logic [$clog2(N)-1:0] grant_idx,
  output logic                 any_grant
);
  localparam int unsigned IW = $clog2(N);
  logic [IW-1:0] last;   // index of the previous winner

  always_comb begin
    int unsigned cand;
    grant     = '0;
    grant_idx = '0;
    any_grant = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      cand = (int'(last) + k) % N;
      if (!any_grant && req[cand]) begin
        any_grant       = 1'b1;
        grant[cand]     = 1'b1;
        grant_idx       = IW'(cand);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    last <= IW'(N - 1);
    else if (advance && any_grant) last <= grant_idx;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
