// fixed_priority_arbiter: registered fixed-priority arbiter.
//
// The lowest-numbered active request always wins: Request 0 > Request 1 >
// ... > Request N-1. The request vector is scanned from bit 0 upwards and the
// index of the first set bit is loaded into the GRANT register on the rising
// clock edge, so the result appears one clock cycle after the request.
//
// Interface
//   clk, rstn  clock and active-low reset; the reset is sampled on the clock
//              edge (synchronous) and clears GRANT to 0
//   req[N-1:0] request vector, req[0] has the highest priority
//   grant      index of the granted request (registered)
//
// The priority order, the registered index output, the synchronous reset to 0
// and GRANT = 0 when nothing requests follow the algorithm this design is
// built from. Because GRANT = 0 also when no one requests, the index alone
// does not tell "Request 0 granted" from "no request"; a user that needs
// that distinction looks at |req of the previous cycle. The parameter N is
// this design's generalisation of the four-requester original.
module fixed_priority_arbiter #(
  parameter int unsigned N     = arb_pkg::NUM_REQ,
  localparam int unsigned IDXW = arb_pkg::idx_width(N)
) (
  input  logic            clk,
  input  logic            rstn,
  input  logic [N-1:0]    req,
  output logic [IDXW-1:0] grant
);

  logic [IDXW-1:0] winner;

  // Scan from the highest-priority bit; the first active request decides.
  always_comb begin
    logic found;
    winner = '0;
    found  = 1'b0;
    for (int i = 0; i < N; i++) begin
      if (!found && req[i]) begin
        winner = IDXW'(i);
        found  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rstn) grant <= '0;
    else       grant <= winner;
  end

endmodule
