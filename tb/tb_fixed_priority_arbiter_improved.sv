// tb_fixed_priority_arbiter_improved: self-checking test of the
// subtract/invert/AND fixed-priority arbiter.
//
// The arbiter has no clock, so the grant is checked one time step after the
// request changes (same-cycle result). Every request value of a four- and a
// five-requester instance is tried; the expected one-hot grant is built here
// by scanning for the lowest set bit, and the index must match it. Also
// checked: the worked example 1110 -> 0010, the reference vectors, and that
// rstn low forces the grant to zero.
module tb_fixed_priority_arbiter_improved;

  localparam int unsigned N4 = 4;
  localparam int unsigned N5 = 5;

  logic          rstn;
  logic [N4-1:0] req4;
  logic [N5-1:0] req5;
  logic [N4-1:0] grant4;
  logic [N5-1:0] grant5;
  logic [1:0]    idx4;
  logic [2:0]    idx5;
  int            checks = 0;
  int            failures = 0;

  fixed_priority_arbiter_improved dut4 (.rstn(rstn), .req(req4), .grant(grant4), .grant_idx(idx4));
  fixed_priority_arbiter_improved #(.N(N5)) dut5 (.rstn(rstn), .req(req5), .grant(grant5), .grant_idx(idx5));

  function automatic logic [7:0] lowest(logic [7:0] r);
    for (int i = 0; i < 8; i++) if (r[i]) return 8'(1) << i;
    return '0;
  endfunction

  function automatic int lowest_idx(logic [7:0] r);
    for (int i = 0; i < 8; i++) if (r[i]) return i;
    return 0;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply4(logic [N4-1:0] r);
    req4 = r;
    #1;
    check($sformatf("N4 grant req=%b", r), int'(grant4), int'(lowest(8'(r))));
    check($sformatf("N4 index req=%b", r), int'(idx4), lowest_idx(8'(r)));
  endtask

  task automatic apply5(logic [N5-1:0] r);
    req5 = r;
    #1;
    check($sformatf("N5 grant req=%b", r), int'(grant5), int'(lowest(8'(r))));
    check($sformatf("N5 index req=%b", r), int'(idx5), lowest_idx(8'(r)));
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rstn = 1'b0;
    req4 = 4'b1111;
    req5 = 5'b11111;
    #1;
    check("N4 grant in reset", int'(grant4), 0);
    check("N5 grant in reset", int'(grant5), 0);
    rstn = 1'b1;
    // Worked example: 1110 - 1 = 1101, inverted 0010, AND 1110 = 0010.
    req4 = 4'b1110;
    #1;
    check("worked example 1110", int'(grant4), int'(4'b0010));
    // Reference vectors and the single-request case 1000.
    apply4(4'b1001);
    apply4(4'b1101);
    apply4(4'b1110);
    apply4(4'b1010);
    apply4(4'b1000);
    for (int r = 0; r < 2**N4; r++) apply4(N4'(r));
    for (int r = 0; r < 2**N5; r++) apply5(N5'(r));
    rstn = 1'b0;
    #1;
    check("reset forces zero again", int'(grant5), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
