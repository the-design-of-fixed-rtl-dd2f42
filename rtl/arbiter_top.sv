// arbiter_top: the three arbiters side by side.
//
// One clock and one active-low reset drive all three; each arbiter has its
// own request input and grant output so they can be compared or used
// independently:
//   fp   fixed_priority_arbiter           registered index, 1-cycle latency
//   fpi  fixed_priority_arbiter_improved  one-hot grant and index, same cycle
//   rr   round_robin_arbiter              registered index, 1-cycle latency,
//                                         rotating priority
// Putting them in one top with separate ports is this design's choice; the
// source presents them as three arbiters for the same four requesters.
module arbiter_top #(
  parameter int unsigned N     = arb_pkg::NUM_REQ,
  localparam int unsigned IDXW = arb_pkg::idx_width(N)
) (
  input  logic            clk,
  input  logic            rstn,
  input  logic [N-1:0]    req_fp,
  output logic [IDXW-1:0] grant_fp,
  input  logic [N-1:0]    req_fpi,
  output logic [N-1:0]    grant_fpi,
  output logic [IDXW-1:0] grant_fpi_idx,
  input  logic [N-1:0]    req_rr,
  output logic [IDXW-1:0] grant_rr
);

  fixed_priority_arbiter #(.N(N)) u_fp (
    .clk   (clk),
    .rstn  (rstn),
    .req   (req_fp),
    .grant (grant_fp)
  );

  fixed_priority_arbiter_improved #(.N(N)) u_fpi (
    .rstn      (rstn),
    .req       (req_fpi),
    .grant     (grant_fpi),
    .grant_idx (grant_fpi_idx)
  );

  round_robin_arbiter #(.N(N)) u_rr (
    .clk   (clk),
    .rstn  (rstn),
    .req   (req_rr),
    .grant (grant_rr)
  );

endmodule
