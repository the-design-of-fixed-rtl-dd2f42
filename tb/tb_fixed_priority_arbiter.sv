// tb_fixed_priority_arbiter: self-checking test of the registered
// fixed-priority arbiter.
//
// Two instances are tested, the default four-requester one and a
// five-requester one. Requests are driven on the falling edge; after each
// rising edge GRANT must equal the lowest set bit of the request vector that
// was present at that edge (one-cycle latency), and it must not have changed
// before that edge. Covered: synchronous reset to 0, the four reference
// vectors 1001, 1101, 1110, 1010 plus 1000, no request (GRANT = 0), and
// random vectors. The expected index is computed here with a descending
// loop, independently of the arbiter's own scan.
module tb_fixed_priority_arbiter;

  localparam int unsigned N4 = 4;
  localparam int unsigned N5 = 5;

  logic          clk = 1'b0;
  logic          rstn;
  logic [N4-1:0] req4;
  logic [N5-1:0] req5;
  logic [1:0]    grant4;
  logic [2:0]    grant5;
  int            checks = 0;
  int            failures = 0;

  always #5 clk = ~clk;

  fixed_priority_arbiter dut4 (.clk(clk), .rstn(rstn), .req(req4), .grant(grant4));
  fixed_priority_arbiter #(.N(N5)) dut5 (.clk(clk), .rstn(rstn), .req(req5), .grant(grant5));

  function automatic int expected(logic [7:0] r, int n);
    int e = 0;
    for (int i = n - 1; i >= 0; i--) if (r[i]) e = i;
    return e;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Apply a request on the falling edge, check that nothing moves before the
  // rising edge, then check the registered grant after it.
  task automatic apply(logic [N4-1:0] r4, logic [N5-1:0] r5);
    int old4, old5;
    @(negedge clk);
    old4 = int'(grant4);
    old5 = int'(grant5);
    req4 = r4;
    req5 = r5;
    #1;
    check("N4 grant holds until the clock edge", int'(grant4), old4);
    check("N5 grant holds until the clock edge", int'(grant5), old5);
    @(posedge clk);
    #1;
    check($sformatf("N4 req=%b", r4), int'(grant4), expected(8'(r4), N4));
    check($sformatf("N5 req=%b", r5), int'(grant5), expected(8'(r5), N5));
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rstn = 1'b0;
    req4 = 4'b1000;
    req5 = 5'b10000;
    repeat (2) @(posedge clk);
    #1;
    check("N4 reset value", int'(grant4), 0);
    check("N5 reset value", int'(grant5), 0);
    @(negedge clk);
    rstn = 1'b1;
    // Reference vectors and the idle case.
    apply(4'b1001, 5'b01001);
    apply(4'b1101, 5'b11000);
    apply(4'b1110, 5'b10100);
    apply(4'b1010, 5'b10000);
    apply(4'b1000, 5'b00000);
    apply(4'b0000, 5'b11111);
    apply(4'b0100, 5'b00010);
    for (int k = 0; k < 300; k++) apply(4'($urandom), 5'($urandom));
    // Reset while requests are pending clears GRANT on the next edge.
    @(negedge clk);
    rstn = 1'b0;
    req4 = 4'b1000;
    @(posedge clk);
    #1;
    check("N4 synchronous reset", int'(grant4), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
