// tb_fuzzy_register: self-checking testbench for fuzzy_register.
//
// Five registers share one set of inputs: the default 11-cell min-max
// register, the 4-cell min-max register of the circuit drawing, and
// 2-cell registers of the algebraic, bounded reset and bounded set types.
// Clock period 20 time units, the 20 ns of the reference test.  The expected state of every cell is tracked with the
// defining equations in real arithmetic; each cell's J is the membership
// input when S1 = 1 and the common J when S1 = 0.  The test clears the
// registers, loads membership values exactly (clear, then S1=1, K=0),
// exercises hold / set / reset / invert through the common inputs and then
// applies random inputs.  q is also checked just before each edge to
// confirm the one-cycle latency.  Each mechanism is counted and must occur.
module tb_fuzzy_register;
  import fuzzy_pkg::*;
  localparam int unsigned W = 4;
  localparam int unsigned M = (1 << W) - 1;
  localparam int unsigned NMAX = 11;
  localparam int NRAND = 5000;
  localparam int NREG = 5;
  localparam int NCELL [NREG] = '{11, 4, 2, 2, 2};
  localparam ff_type_e TYPE [NREG] =
    '{FF_MINMAX, FF_MINMAX, FF_ALGEBRAIC, FF_BOUNDED_RESET, FF_BOUNDED_SET};

  logic         clk = 1'b0;
  logic         s1;
  logic [W-1:0] j, k;
  logic [W-1:0] men [NMAX];
  logic [W-1:0] q0 [11];
  logic [W-1:0] q1 [4];
  logic [W-1:0] q2 [2];
  logic [W-1:0] q3 [2];
  logic [W-1:0] q4 [2];
  logic [W-1:0] men4 [4];
  logic [W-1:0] men2 [2];
  int exp_q [NREG][NMAX];
  int checks = 0, failures = 0;
  int n_load = 0, n_common = 0, n_hold = 0, n_set = 0, n_reset = 0, n_inv = 0;

  assign men4 = men[0:3];
  assign men2 = men[0:1];

  fuzzy_register dut0 (.clk(clk), .s1(s1), .j(j), .k(k), .men(men), .q(q0));
  fuzzy_register #(.W(W), .N(4), .FF_TYPE(FF_MINMAX)) dut1 (
    .clk(clk), .s1(s1), .j(j), .k(k), .men(men4), .q(q1));
  fuzzy_register #(.W(W), .N(2), .FF_TYPE(FF_ALGEBRAIC)) dut2 (
    .clk(clk), .s1(s1), .j(j), .k(k), .men(men2), .q(q2));
  fuzzy_register #(.W(W), .N(2), .FF_TYPE(FF_BOUNDED_RESET)) dut3 (
    .clk(clk), .s1(s1), .j(j), .k(k), .men(men2), .q(q3));
  fuzzy_register #(.W(W), .N(2), .FF_TYPE(FF_BOUNDED_SET)) dut4 (
    .clk(clk), .s1(s1), .j(j), .k(k), .men(men2), .q(q4));

  always #10 clk = ~clk;

  function automatic real fmax(real a, real b); return (a > b) ? a : b; endfunction
  function automatic real fmin(real a, real b); return (a < b) ? a : b; endfunction

  function automatic int ref_next(ff_type_e t, int jj, int kk, int qq);
    real rj, rk, rq, r;
    rj = real'(jj) / M; rk = real'(kk) / M; rq = real'(qq) / M;
    case (t)
      FF_MINMAX:        r = fmin(fmin(fmax(rj, 1.0 - rk), fmax(rj, rq)), fmax(1.0 - rk, 1.0 - rq));
      FF_ALGEBRAIC:     r = rj + rq - rj * rq - rk * rq;
      FF_BOUNDED_RESET: r = fmin(1.0, fmax(0.0, rj - rq) + fmax(0.0, rq - rk));
      default:          r = fmax(0.0, fmin(1.0, rj + rq) + fmin(1.0, 2.0 - rk - rq) - 1.0);
    endcase
    return $rtoi(r * M + 0.5);
  endfunction

  function automatic int got(int r, int c);
    case (r)
      0: return int'(q0[c]);
      1: return int'(q1[c]);
      2: return int'(q2[c]);
      3: return int'(q3[c]);
      default: return int'(q4[c]);
    endcase
  endfunction

  task automatic check_all(string what);
    for (int r = 0; r < NREG; r++)
      for (int c = 0; c < NCELL[r]; c++) begin
        checks++;
        if (got(r, c) != exp_q[r][c]) begin
          failures++;
          if (failures < 20)
            $display("FAIL %s: reg %0d cell %0d got %0d want %0d (s1=%0b j=%0d k=%0d men=%0d)",
                     what, r, c, got(r, c), exp_q[r][c], s1, j, k, men[c]);
        end
      end
  endtask

  task automatic step(logic ss, int jj, int kk, bit rand_men);
    @(negedge clk);
    s1 = ss; j = W'(jj); k = W'(kk);
    if (rand_men) foreach (men[c]) men[c] = W'($urandom_range(M, 0));
    #1 check_all("before edge");
    @(posedge clk);
    for (int r = 0; r < NREG; r++)
      for (int c = 0; c < NCELL[r]; c++)
        exp_q[r][c] = ref_next(TYPE[r], ss ? int'(men[c]) : jj, kk, exp_q[r][c]);
    if (ss) n_load++; else n_common++;
    #1 check_all("after edge");
  endtask

  task automatic check_value(string what, int r, int c, int want);
    checks++;
    if (got(r, c) != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: reg %0d cell %0d got %0d want %0d", what, r, c, got(r, c), want);
    end
  endtask

  initial begin
    repeat (NRAND + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int snap [NREG][NMAX];
    s1 = 1'b0; j = '0; k = W'(M);
    foreach (men[c]) men[c] = '0;
    @(posedge clk); @(posedge clk); #1;
    foreach (exp_q[r, c]) exp_q[r][c] = 0;
    check_all("cleared");
    for (int rep = 0; rep < 50; rep++) begin
      // exact parallel load of membership values
      step(1'b0, 0, M, 1'b0);
      step(1'b1, 0, 0, 1'b1);
      for (int c = 0; c < NCELL[0]; c++) check_value("load", 0, c, int'(men[c]));
      snap = exp_q;
      step(1'b0, 0, 0, 1'b1);                 // hold, membership inputs ignored
      foreach (snap[r, c]) if (c < NCELL[r]) check_value("hold", r, c, snap[r][c]);
      n_hold++;
      step(1'b0, M, M, 1'b1);                 // invert
      foreach (snap[r, c]) if (c < NCELL[r]) check_value("invert", r, c, M - snap[r][c]);
      n_inv++;
      step(1'b0, M, 0, 1'b1);                 // set
      foreach (snap[r, c]) if (c < NCELL[r]) check_value("set", r, c, M);
      n_set++;
      step(1'b0, 0, M, 1'b1);                 // reset
      foreach (snap[r, c]) if (c < NCELL[r]) check_value("reset", r, c, 0);
      n_reset++;
    end
    for (int n = 0; n < NRAND; n++)
      step(1'($urandom_range(1, 0)), $urandom_range(M, 0), $urandom_range(M, 0), 1'b1);
    $display("load=%0d common=%0d hold=%0d set=%0d reset=%0d invert=%0d",
             n_load, n_common, n_hold, n_set, n_reset, n_inv);
    checks++;
    if (n_load == 0 || n_common == 0 || n_hold == 0 || n_set == 0 || n_reset == 0 || n_inv == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
