// tb_bounded_reset_ff: self-checking testbench for bounded_reset_ff (Q+ = 1 min {0 max (J-Q) + 0 max (Q-K)}).
//
// Clocks the flip-flop with a period of 20 time units (20 ns in the reference test).  The state is first cleared by
// J=0, K=M as the reference test procedure does, then the four binary
// behaviours (hold, set, reset, invert) are checked, followed by random
// fuzzy J/K sequences.  The expected state is computed from the defining
// equation in real arithmetic (values x/M) and rounded to the nearest
// code.  Every edge checks q, and qn = M - (state before the edge).  The
// one-cycle latency is checked by looking at q just before each edge: a
// new J/K must not reach q until the edge.
module tb_bounded_reset_ff;
  localparam int unsigned W = 4;
  localparam int unsigned M = (1 << W) - 1;
  localparam int NRAND = 20000;

  logic         clk = 1'b0;
  logic [W-1:0] j, k, q, qn;
  int checks = 0, failures = 0;
  int exp_q, exp_qn;
  int n_hold = 0, n_set = 0, n_reset = 0, n_inv = 0;

  bounded_reset_ff #(.W(W)) dut (.clk(clk), .j(j), .k(k), .q(q), .qn(qn));

  always #10 clk = ~clk;

  // Reference next state from the defining equation.
  function automatic int ref_next(int jj, int kk, int qq);
    real rj, rk, rq, r;
    rj = real'(jj) / M; rk = real'(kk) / M; rq = real'(qq) / M;
    r = fmin(1.0, fmax(0.0, rj - rq) + fmax(0.0, rq - rk));
    return $rtoi(r * M + 0.5);
  endfunction

  function automatic real fmax(real a, real b); return (a > b) ? a : b; endfunction
  function automatic real fmin(real a, real b); return (a < b) ? a : b; endfunction

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d (j=%0d k=%0d)", what, got, want, j, k);
    end
  endtask

  // Apply j/k for one clock and check the result.
  task automatic step(int jj, int kk);
    @(negedge clk);
    j = W'(jj); k = W'(kk);
    #1 check("q before edge", int'(q), exp_q);   // latency: no change before the edge
    @(posedge clk);
    exp_qn = M - exp_q;
    exp_q  = ref_next(jj, kk, exp_q);
    #1;
    check("q", int'(q), exp_q);
    check("qn", int'(qn), exp_qn);
  endtask

  initial begin
    repeat (NRAND * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int old;
    j = '0; k = W'(M);
    // Clear: two edges with J=0, K=M so that q and qn are both defined.
    @(posedge clk); @(posedge clk); #1;
    exp_q = 0;
    check("cleared q", int'(q), 0);
    check("cleared qn", int'(qn), M);
    // Binary behaviours from a fuzzy starting state.
    for (int v = 0; v <= int'(M); v++) begin
      step(v, 0);               // J=v, K=0 loads at least v
      old = exp_q;
      step(0, 0);  check("hold", int'(q), old); n_hold++;
      step(M, M);  check("invert", int'(q), M - old); n_inv++;
      step(M, 0);  check("set", int'(q), M); n_set++;
      step(0, M);  check("reset", int'(q), 0); n_reset++;
      step(v, 0);
      step(M, M);
    end
    // Random fuzzy inputs.
    for (int n = 0; n < NRAND; n++) begin
      step($urandom_range(M, 0), $urandom_range(M, 0));
    end
    $display("hold=%0d set=%0d reset=%0d invert=%0d", n_hold, n_set, n_reset, n_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
