// fixed_priority_arbiter_improved: combinational fixed-priority arbiter that
// isolates the lowest set request bit arithmetically.
//
// Subtracting one from the request vector flips its lowest set bit and every
// zero below it; inverting that result and ANDing it with the original vector
// leaves exactly the lowest set bit:  grant = req & ~(req - 1).
// Example: req = 1110 -> req-1 = 1101 -> ~ = 0010 -> & req = 0010 (Request 1).
// The same priority order as the scanning arbiter results (Request 0 highest),
// but there is no register in the path: the grant follows the request in the
// same clock cycle.
//
// Interface
//   rstn        active-low reset; while low the grant is forced to zero
//   req[N-1:0]  request vector, req[0] has the highest priority
//   grant       one-hot grant, all zero when nothing requests
//   grant_idx   binary index of the set grant bit (0 when nothing requests)
//
// The subtract/invert/AND algorithm and the one-hot grant follow the source
// design. That source also lists a clock input and a 2-bit index output for
// this arbiter; here the clock is left out because nothing is registered, and
// the index is provided next to the one-hot vector so both forms are
// available. Gating the grant with rstn combinationally is this design's
// reading of "force GRANT = 0 in reset" for a clockless block.
module fixed_priority_arbiter_improved #(
  parameter int unsigned N     = arb_pkg::NUM_REQ,
  localparam int unsigned IDXW = arb_pkg::idx_width(N)
) (
  input  logic            rstn,
  input  logic [N-1:0]    req,
  output logic [N-1:0]    grant,
  output logic [IDXW-1:0] grant_idx
);

  logic [N-1:0] temp;   // req - 1
  logic [N-1:0] mask;   // ~(req - 1)

  always_comb begin
    temp  = req - N'(1);
    mask  = ~temp;
    grant = rstn ? (req & mask) : '0;
  end

  // One-hot to binary: OR together the indices of the set bits.
  always_comb begin
    grant_idx = '0;
    for (int i = 0; i < N; i++) begin
      if (grant[i]) grant_idx = grant_idx | IDXW'(i);
    end
  end

  // At most one grant bit, and only for a bit that requested.
  always_comb begin
    assert ($onehot0(grant)) else $error("grant is not one-hot: %b", grant);
    assert ((grant & ~req) == '0) else $error("grant %b without request %b", grant, req);
  end

endmodule
