// round_robin_arbiter: registered round-robin arbiter.
//
// Priority rotates: the requester one past the last grant has the highest
// priority, then the ones after it, wrapping from N-1 back to 0. Each clock
// edge the arbiter computes NEXT = (GRANT + 1) mod N, searches
// req[NEXT], req[NEXT+1], ... (mod N) and loads the first active index into
// GRANT. Every requester that keeps its request up is therefore granted
// within N cycles, so none is starved.
//
// The search is built on the fixed-priority arbiter: the request vector is
// rotated right by NEXT so that requester NEXT lands on bit 0, the
// subtract/invert/AND fixed-priority arbiter picks the lowest set bit of the
// rotated vector, and NEXT is added back (mod N) to get the real index.
//
// Interface
//   clk, rstn  clock and active-low reset, sampled on the clock edge
//              (synchronous); reset loads GRANT = N-1, so Request 0 has the
//              highest priority in the first cycle after reset
//   req[N-1:0] request vector
//   grant      index of the granted request (registered, one cycle after req)
//
// The reset value N-1 (3 for four requesters), NEXT = (GRANT+1) mod N, the
// wrapping search and the one-cycle latency follow the source design. When
// no request is active the search finds nothing and GRANT keeps its value;
// this is how this design reads the source's loop, which assigns GRANT only
// on a hit. The rotate-and-reuse structure is this design's choice.
module round_robin_arbiter #(
  parameter int unsigned N     = arb_pkg::NUM_REQ,
  localparam int unsigned IDXW = arb_pkg::idx_width(N)
) (
  input  logic            clk,
  input  logic            rstn,
  input  logic [N-1:0]    req,
  output logic [IDXW-1:0] grant
);

  logic [IDXW-1:0] next_ptr;   // NEXT: requester with the highest priority
  logic [N-1:0]    req_rot;    // req rotated so that req[next_ptr] is bit 0
  logic [N-1:0]    rot_grant;  // one-hot winner within req_rot
  logic [IDXW-1:0] rot_idx;    // its index within req_rot
  logic [IDXW:0]   sum;        // next_ptr + rot_idx, below 2N
  logic [IDXW-1:0] winner;

  always_comb begin
    next_ptr = (grant == IDXW'(N - 1)) ? '0 : grant + IDXW'(1);
  end

  // Rotate right by next_ptr: req_rot[i] = req[(i + next_ptr) mod N].
  always_comb begin
    for (int i = 0; i < N; i++) begin
      req_rot[i] = req[(i + int'(next_ptr)) % N];
    end
  end

  fixed_priority_arbiter_improved #(.N(N)) u_fpa (
    .rstn      (1'b1),
    .req       (req_rot),
    .grant     (rot_grant),
    .grant_idx (rot_idx)
  );

  always_comb begin
    sum    = {1'b0, next_ptr} + {1'b0, rot_idx};
    winner = (sum >= (IDXW+1)'(N)) ? IDXW'(sum - (IDXW+1)'(N)) : sum[IDXW-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rstn)          grant <= IDXW'(N - 1);
    else if (|rot_grant) grant <= winner;
  end

  // The grant index always names an existing requester (only checkable when
  // N is not a power of two; otherwise every index value is legal).
  if (N != 2**IDXW) begin : g_range_check
    always_ff @(posedge clk) begin
      if (rstn) assert (grant < IDXW'(N))
        else $error("grant index %0d out of range", grant);
    end
  end

endmodule
