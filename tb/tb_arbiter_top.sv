// tb_arbiter_top: end-to-end test of the three arbiters at their default
// size (four requesters), with no parameter overrides on the top.
//
// Phase 1 replays the reference vectors: 1001, 1101, 1110, 1010, 1000 on the
// two fixed-priority arbiters (expected Request 0, 0, 1, 1, 3) and, right
// after reset, 1101, 1111, 1110, 1100 on the round-robin arbiter (expected
// Request 0, 1, 2, 3). Phase 2 runs random traffic on all three, with the
// round-robin requesters holding their requests until served. Every cycle
// all outputs are compared with reference models kept in this testbench.
//
// Mechanisms counted, each of which must occur at least once:
//   contention  several fixed-priority requests at once, lowest index wins
//   latency     the registered fixed-priority grant changes one edge after
//               its request while the improved one already shows it
//   rotation    the round-robin grant moves on while the previous winner
//               still requests
//   wrap        the round-robin pointer wraps from Request 3 to Request 0
//   idle        no round-robin request: the grant is held
//   reset       reset restores GRANT = 0 / 3 and clears the one-hot grant
module tb_arbiter_top;

  localparam int unsigned N = 4;

  logic         clk = 1'b0;
  logic         rstn;
  logic [N-1:0] req_fp, req_fpi, req_rr;
  logic [1:0]   grant_fp, grant_fpi_idx, grant_rr;
  logic [N-1:0] grant_fpi;
  int           checks = 0;
  int           failures = 0;
  int           model_fp, model_rr;
  int           n_contention = 0, n_latency = 0, n_rotation = 0;
  int           n_wrap = 0, n_idle = 0, n_reset = 0;
  int           wait_rr [N];

  always #5 clk = ~clk;

  arbiter_top dut (
    .clk, .rstn,
    .req_fp, .grant_fp,
    .req_fpi, .grant_fpi, .grant_fpi_idx,
    .req_rr, .grant_rr
  );

  function automatic int lowest(logic [N-1:0] r);
    for (int i = 0; i < N; i++) if (r[i]) return i;
    return 0;
  endfunction

  function automatic int rr_next(int last, logic [N-1:0] r);
    for (int i = 1; i <= N; i++) if (r[(last + i) % N]) return (last + i) % N;
    return last;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // One clock cycle: drive on the falling edge, check the combinational
  // arbiter at once and the registered ones after the rising edge.
  task automatic cycle(logic [N-1:0] rfp, logic [N-1:0] rfpi, logic [N-1:0] rrr);
    int prev_fp, prev_rr;
    @(negedge clk);
    req_fp  = rfp;
    req_fpi = rfpi;
    req_rr  = rrr;
    #1;
    prev_fp = int'(grant_fp);
    prev_rr = int'(grant_rr);
    check("fpi one-hot", int'(grant_fpi), (rfpi == '0) ? 0 : (1 << lowest(rfpi)));
    check("fpi index", int'(grant_fpi_idx), lowest(rfpi));
    check("fp holds before edge", prev_fp, model_fp);
    if ($countones(rfp) > 1) n_contention++;
    @(posedge clk);
    model_fp = lowest(rfp);
    model_rr = rr_next(prev_rr, rrr);
    #1;
    check($sformatf("fp req=%b", rfp), int'(grant_fp), model_fp);
    check($sformatf("rr req=%b", rrr), int'(grant_rr), model_rr);
    if (rfp == rfpi && model_fp != prev_fp) n_latency++;
    if (rrr[prev_rr] && model_rr != prev_rr) n_rotation++;
    if (prev_rr == N - 1 && model_rr == 0) n_wrap++;
    if (rrr == '0) n_idle++;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rstn = 1'b0;
    req_fpi = 4'b1111;
    #1;
    check("fpi cleared in reset", int'(grant_fpi), 0);
    @(posedge clk);
    #1;
    check("fp reset value", int'(grant_fp), 0);
    check("rr reset value", int'(grant_rr), N - 1);
    model_fp = 0;
    model_rr = N - 1;
    n_reset++;
    rstn = 1'b1;
  endtask

  task automatic mech(string name, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism '%s' never happened", name);
    end else begin
      $display("mechanism %-10s happened %0d times", name, n);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] pend;
    rstn = 1'b0;
    req_fp = '0; req_fpi = '0; req_rr = '0;
    do_reset();
    cycle(4'b0000, 4'b0000, 4'b0000);
    // Reference vectors.
    cycle(4'b1001, 4'b1001, 4'b1101);
    check("table fp 1001", int'(grant_fp), 0);
    check("table rr 1101", int'(grant_rr), 0);
    cycle(4'b1101, 4'b1101, 4'b1111);
    check("table fp 1101", int'(grant_fp), 0);
    check("table rr 1111", int'(grant_rr), 1);
    cycle(4'b1110, 4'b1110, 4'b1110);
    check("table fp 1110", int'(grant_fp), 1);
    check("table rr 1110", int'(grant_rr), 2);
    cycle(4'b1010, 4'b1010, 4'b1100);
    check("table fp 1010", int'(grant_fp), 1);
    check("table rr 1100", int'(grant_rr), 3);
    cycle(4'b1000, 4'b1000, 4'b1000);
    check("table fp 1000", int'(grant_fp), 3);
    check("table rr 1000", int'(grant_rr), 3);
    // Random traffic; round-robin requests stay up until granted.
    pend = '0;
    foreach (wait_rr[i]) wait_rr[i] = 0;
    for (int k = 0; k < 2000; k++) begin
      logic [N-1:0] r;
      if (k == 1000) begin
        // Reset restarts the fairness bookkeeping.
        do_reset();
        pend = '0;
        foreach (wait_rr[i]) wait_rr[i] = 0;
      end
      r = N'($urandom);
      if ($urandom_range(0, 7) == 0) pend = '0;          // occasional idle cycle
      else pend = pend | N'($urandom);
      cycle(r, ($urandom_range(0, 1) == 0) ? r : N'($urandom), pend);
      pend[grant_rr] = 1'b0;
      for (int i = 0; i < N; i++) begin
        wait_rr[i] = pend[i] ? wait_rr[i] + 1 : 0;
        if (wait_rr[i] >= N) begin
          failures++;
          $display("FAIL rr requester %0d waited %0d cycles", i, wait_rr[i]);
        end
      end
    end
    mech("contention", n_contention);
    mech("latency", n_latency);
    mech("rotation", n_rotation);
    mech("wrap", n_wrap);
    mech("idle", n_idle);
    mech("reset", n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
