// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters per cycle. The search starts at the requester
// after the one granted last, so every persistent requester is served within
// N grants: requests above the last grant are masked in first, and the
// lowest set bit of the masked (or, if empty, the full) request vector wins.
// The pointer moves only when `advance` is high in a cycle that
// produced a grant (the caller sets it when the granted transfer really
// happens). The document says only that virtual channels share a physical
// channel under a round-robin policy; this implementation (rotating priority
// pointer, one-hot grant, combinational request-to-grant path) is this
// design's own.
//
// Interface: req[N] in, grant[N] one-hot out (zero when no request),
// grant_idx the index of the granted bit. Timing: grant is combinational from
// req; the pointer updates on the rising clock edge.
module rr_arbiter #(
  parameter int unsigned N = 2
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [N-1:0]                 req,
  input  logic                         advance,
  output logic [N-1:0]                 grant,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] last_q;   // index granted most recently
  logic [N-1:0]  above;    // requesters after last_q in the rotation
  logic [N-1:0]  hi, pick;

  // lowest set bit of x
  function automatic logic [N-1:0] lowest(input logic [N-1:0] x);
    return x & (~x + 1'b1);
  endfunction

  always_comb begin
    for (int i = 0; i < N; i++) above[i] = (i > int'(last_q));
    hi    = req & above;
    pick  = (hi != '0) ? hi : req;
    grant = lowest(pick);
    grant_idx = '0;
    for (int i = 0; i < N; i++)
      if (grant[i]) grant_idx = IW'(i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      last_q <= IW'(N - 1);          // first search starts at requester 0
    else if (advance && (|grant))
      last_q <= grant_idx;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  assert property (@(posedge clk) disable iff (!rst_n) (|req) |-> (|grant));

endmodule
