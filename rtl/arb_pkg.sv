// arb_pkg: constants and helpers shared by the arbiters.
//
// NUM_REQ is the number of requesters every arbiter is built for by default
// (four, Request 0 to Request 3). idx_width() gives the width of a grant
// index for n requesters; it is at least one bit so that a one-requester
// arbiter still has a legal port.
package arb_pkg;

  parameter int unsigned NUM_REQ = 4;

  function automatic int unsigned idx_width(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
