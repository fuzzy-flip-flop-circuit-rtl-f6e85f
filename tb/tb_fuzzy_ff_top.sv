// tb_fuzzy_ff_top: end-to-end testbench of fuzzy_ff_top at its default
// parameters (4-bit values, 11-cell register).
//
// Runs both parts of the top level together, with a clock period of 20 time
// units (the 20 ns of the reference test).  The register is cleared, loaded
// with 11 membership values, then held, inverted, set and reset through its
// common J/K inputs, and finally driven with random inputs.  Meanwhile the
// four single flip-flops (min-max, algebraic, bounded reset, bounded set)
// receive one shared J/K sequence: clear, the binary behaviours (hold, set,
// reset, invert) and random fuzzy inputs.  Expected values come from the
// defining equations in real arithmetic, rounded to the nearest code.  Every
// mechanism is counted and a failure is counted for one that never occurs.
module tb_fuzzy_ff_top;
  import fuzzy_pkg::*;
  localparam int unsigned W = FUZZY_W;
  localparam int unsigned M = (1 << W) - 1;
  localparam int unsigned N = 11;
  localparam int NRAND = 3000;

  logic         clk = 1'b0;
  logic         reg_s1;
  logic [W-1:0] reg_j, reg_k, ff_j, ff_k;
  logic [W-1:0] reg_men [N];
  logic [W-1:0] reg_q   [N];
  logic [W-1:0] ff_q    [NUM_FF_TYPES];
  logic [W-1:0] ff_qn   [NUM_FF_TYPES];

  int exp_reg [N];
  int exp_ff [NUM_FF_TYPES];
  int exp_ffn [NUM_FF_TYPES];
  int checks = 0, failures = 0;
  int n_load = 0, n_common = 0, n_hold = 0, n_set = 0, n_reset = 0, n_inv = 0;

  fuzzy_ff_top dut (
    .clk(clk), .reg_s1(reg_s1), .reg_j(reg_j), .reg_k(reg_k), .reg_men(reg_men),
    .reg_q(reg_q), .ff_j(ff_j), .ff_k(ff_k), .ff_q(ff_q), .ff_qn(ff_qn));

  always #10 clk = ~clk;

  function automatic real fmax(real a, real b); return (a > b) ? a : b; endfunction
  function automatic real fmin(real a, real b); return (a < b) ? a : b; endfunction

  function automatic int ref_next(int t, int jj, int kk, int qq);
    real rj, rk, rq, r;
    rj = real'(jj) / M; rk = real'(kk) / M; rq = real'(qq) / M;
    case (t)
      0:       r = fmin(fmin(fmax(rj, 1.0 - rk), fmax(rj, rq)), fmax(1.0 - rk, 1.0 - rq));
      1:       r = rj + rq - rj * rq - rk * rq;
      2:       r = fmin(1.0, fmax(0.0, rj - rq) + fmax(0.0, rq - rk));
      default: r = fmax(0.0, fmin(1.0, rj + rq) + fmin(1.0, 2.0 - rk - rq) - 1.0);
    endcase
    return $rtoi(r * M + 0.5);
  endfunction

  task automatic chk(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  task automatic check_all(string what, bit with_qn);
    foreach (reg_q[c]) chk({what, " reg_q"}, int'(reg_q[c]), exp_reg[c]);
    foreach (ff_q[t]) chk({what, " ff_q"}, int'(ff_q[t]), exp_ff[t]);
    if (with_qn) foreach (ff_qn[t]) chk({what, " ff_qn"}, int'(ff_qn[t]), exp_ffn[t]);
  endtask

  // One clock with the given register and flip-flop inputs.
  task automatic step(logic s1, int rj, int rk, int fj, int fk, bit rand_men);
    @(negedge clk);
    reg_s1 = s1; reg_j = W'(rj); reg_k = W'(rk); ff_j = W'(fj); ff_k = W'(fk);
    if (rand_men) foreach (reg_men[c]) reg_men[c] = W'($urandom_range(M, 0));
    #1 check_all("before edge", 1'b0);
    @(posedge clk);
    foreach (exp_reg[c]) exp_reg[c] = ref_next(0, s1 ? int'(reg_men[c]) : rj, rk, exp_reg[c]);
    foreach (exp_ff[t]) begin
      exp_ffn[t] = M - exp_ff[t];
      exp_ff[t]  = ref_next(t, fj, fk, exp_ff[t]);
    end
    if (s1) n_load++; else n_common++;
    #1 check_all("after edge", 1'b1);
  endtask

  initial begin
    repeat (NRAND + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int snap [N];
    int fsnap [NUM_FF_TYPES];
    int v;
    reg_s1 = 1'b0; reg_j = '0; reg_k = W'(M); ff_j = '0; ff_k = W'(M);
    foreach (reg_men[c]) reg_men[c] = '0;
    @(posedge clk); @(posedge clk); #1;
    foreach (exp_reg[c]) exp_reg[c] = 0;
    foreach (exp_ff[t]) begin exp_ff[t] = 0; exp_ffn[t] = M; end
    check_all("cleared", 1'b1);
    for (int rep = 0; rep < 16; rep++) begin
      v = rep;
      step(1'b0, 0, M, v, 0, 1'b0);            // register clear; ff: J=v, K=0
      step(1'b1, 0, 0, 0, 0, 1'b1);            // register load; ff hold
      foreach (reg_q[c]) chk("load", int'(reg_q[c]), int'(reg_men[c]));
      snap = exp_reg; fsnap = exp_ff;
      step(1'b0, 0, 0, 0, 0, 1'b1);            // hold
      foreach (reg_q[c]) chk("reg hold", int'(reg_q[c]), snap[c]);
      foreach (ff_q[t]) chk("ff hold", int'(ff_q[t]), fsnap[t]);
      n_hold++;
      step(1'b0, M, M, M, M, 1'b1);            // invert
      foreach (reg_q[c]) chk("reg invert", int'(reg_q[c]), M - snap[c]);
      foreach (ff_q[t]) chk("ff invert", int'(ff_q[t]), M - fsnap[t]);
      n_inv++;
      step(1'b0, M, 0, M, 0, 1'b1);            // set
      foreach (reg_q[c]) chk("reg set", int'(reg_q[c]), M);
      foreach (ff_q[t]) chk("ff set", int'(ff_q[t]), M);
      n_set++;
      step(1'b0, 0, M, 0, M, 1'b1);            // reset
      foreach (reg_q[c]) chk("reg reset", int'(reg_q[c]), 0);
      foreach (ff_q[t]) chk("ff reset", int'(ff_q[t]), 0);
      n_reset++;
    end
    for (int n = 0; n < NRAND; n++)
      step(1'($urandom_range(1, 0)), $urandom_range(M, 0), $urandom_range(M, 0),
           $urandom_range(M, 0), $urandom_range(M, 0), 1'b1);
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
