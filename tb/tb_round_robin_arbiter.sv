// tb_round_robin_arbiter: self-checking test of the registered round-robin
// arbiter.
//
// A four- and a five-requester instance run side by side. A reference model
// in the testbench keeps its own copy of the last grant and, on each rising
// edge, walks the requesters starting one past it, wrapping around. The
// sequence checked first is the reference one after reset: 1101 -> 0,
// 1111 -> 1, 1110 -> 2, 1100 -> 3. Then: holding all requests rotates the
// grant through every requester, an idle cycle keeps the grant, reset
// restores N-1, and random traffic in which every requester holds its
// request until served must serve each one within N cycles (no starvation).
module tb_round_robin_arbiter;

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
  int            model4, model5;

  always #5 clk = ~clk;

  round_robin_arbiter dut4 (.clk(clk), .rstn(rstn), .req(req4), .grant(grant4));
  round_robin_arbiter #(.N(N5)) dut5 (.clk(clk), .rstn(rstn), .req(req5), .grant(grant5));

  function automatic int rr_next(int last, logic [7:0] r, int n);
    for (int i = 1; i <= n; i++) begin
      int c = (last + i) % n;
      if (r[c]) return c;
    end
    return last;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Drive both instances for one cycle and compare with the model.
  task automatic step(logic [N4-1:0] r4, logic [N5-1:0] r5);
    @(negedge clk);
    req4 = r4;
    req5 = r5;
    #1;
    check("N4 grant holds until the clock edge", int'(grant4), model4);
    @(posedge clk);
    model4 = rr_next(model4, 8'(r4), N4);
    model5 = rr_next(model5, 8'(r5), N5);
    #1;
    check($sformatf("N4 req=%b", r4), int'(grant4), model4);
    check($sformatf("N5 req=%b", r5), int'(grant5), model5);
  endtask

  task automatic do_reset();
    @(negedge clk);
    rstn = 1'b0;
    @(posedge clk);
    #1;
    model4 = N4 - 1;
    model5 = N5 - 1;
    check("N4 reset value", int'(grant4), N4 - 1);
    check("N5 reset value", int'(grant5), N5 - 1);
    @(negedge clk);
    rstn = 1'b1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N4-1:0] pend4;
    int            wait4 [N4];
    rstn = 1'b0;
    req4 = '0;
    req5 = '0;
    do_reset();
    // Idle keeps the reset value.
    step(4'b0000, 5'b00000);
    check("idle keeps grant", int'(grant4), 3);
    // Reference sequence.
    step(4'b1101, 5'b11101);
    check("1101 -> Request 0", int'(grant4), 0);
    step(4'b1111, 5'b11111);
    check("1111 -> Request 1", int'(grant4), 1);
    step(4'b1110, 5'b11110);
    check("1110 -> Request 2", int'(grant4), 2);
    step(4'b1100, 5'b11100);
    check("1100 -> Request 3", int'(grant4), 3);
    step(4'b1000, 5'b11000);
    check("1000 -> Request 3", int'(grant4), 3);
    // All requesting: strict rotation with wrap-around.
    for (int k = 0; k < 12; k++) begin
      step(4'b1111, 5'b11111);
      check("rotation N4", int'(grant4), k % N4);
      check("rotation N5", int'(grant5), k % N5);
    end
    step(4'b0000, 5'b00000);
    check("idle keeps grant after rotation", int'(grant4), 3);
    do_reset();
    step(4'b1111, 5'b11111);
    check("after reset Request 0 first", int'(grant4), 0);
    // Random traffic.
    for (int k = 0; k < 300; k++) step(4'($urandom), 5'($urandom));
    // Requests held until served: each one is served within N cycles.
    pend4 = '0;
    foreach (wait4[i]) wait4[i] = 0;
    for (int k = 0; k < 400; k++) begin
      pend4 = pend4 | 4'($urandom);
      step(pend4, 5'($urandom));
      pend4[grant4] = 1'b0;
      for (int i = 0; i < N4; i++) begin
        if (pend4[i]) wait4[i]++;
        else          wait4[i] = 0;
        if (wait4[i] >= N4) begin
          failures++;
          $display("FAIL requester %0d starved", i);
        end
      end
      checks++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
