// rr_arbiter: round-robin arbiter for N requesters.
//
// A priority pointer names the requester that currently has the highest
// priority; priority then falls off in increasing index order, wrapping
// around (the "clockwise" order). The grant goes combinationally to the first
// active request found from the pointer onwards. When the grant is taken
// (accept = 1) the pointer moves to the index just after the granted one, so
// the requester that was just served has the lowest priority in the next
// round. No requester can therefore wait more than N-1 grants: the scheme is
// starvation-free. This is the behaviour the document gives for its
// round-robin arbiter; the pointer-and-scan structure is this design's own.
//
// Interface: req[N] in, grant[N] one-hot out, grant_idx and valid out, accept
// in. Timing: grant is combinational from req and the pointer; the pointer
// updates on the clock edge where accept && valid. Reset gives index 0 the
// highest priority.
module rr_arbiter #(
  parameter int unsigned N = 5,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          accept,
  output logic [N-1:0]  grant,
  output logic [IW-1:0] grant_idx,
  output logic          valid
);

  logic [IW-1:0] prio;  // index holding the highest priority

  always_comb begin
    logic [IW-1:0] idx;
    grant     = '0;
    grant_idx = '0;
    valid     = 1'b0;
    // Scan N positions starting at the pointer; keep the first hit.
    for (int unsigned k = 0; k < N; k++) begin
      idx = IW'((int'(prio) + k) % N);
      if (!valid && req[idx]) begin
        valid     = 1'b1;
        grant_idx = idx;
      end
    end
    if (valid) grant[grant_idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio <= '0;
    end else if (accept && valid) begin
      prio <= (grant_idx == IW'(N - 1)) ? '0 : grant_idx + 1'b1;
    end
  end

  a_onehot:    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);

endmodule
