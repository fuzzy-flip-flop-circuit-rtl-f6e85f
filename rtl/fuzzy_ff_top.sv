// fuzzy_ff_top: the fuzzy flip-flop family and the fuzzy register.
//
// Two independent parts stand side by side:
//  * the N-cell fuzzy register of min-max flip-flops (ports reg_*), with
//    membership inputs reg_men[], common J/K inputs and the select s1;
//  * one flip-flop of each of the four types - min-max, algebraic, bounded
//    reset and bounded set - driven by the same J/K pair (ports ff_*), so
//    their responses to one input sequence can be compared.  ff_q[t] and
//    ff_qn[t] are indexed by fuzzy_pkg::ff_type_e.
// Timing: everything is loaded on the rising edge of clk, one cycle from
// input to q (qn one more).  There is no reset: clock J=0, K=M once to
// clear the state.
// The four types and the register follow the reference design; placing
// them together in one top level is this implementation's choice.
module fuzzy_ff_top
  import fuzzy_pkg::*;
#(
  parameter int unsigned W = FUZZY_W,
  parameter int unsigned N = 11
) (
  input  logic         clk,
  // fuzzy register
  input  logic         reg_s1,
  input  logic [W-1:0] reg_j,
  input  logic [W-1:0] reg_k,
  input  logic [W-1:0] reg_men [N],
  output logic [W-1:0] reg_q   [N],
  // four flip-flop types
  input  logic [W-1:0] ff_j,
  input  logic [W-1:0] ff_k,
  output logic [W-1:0] ff_q  [NUM_FF_TYPES],
  output logic [W-1:0] ff_qn [NUM_FF_TYPES]
);

  fuzzy_register #(.W(W), .N(N), .FF_TYPE(FF_MINMAX)) u_register (
    .clk(clk), .s1(reg_s1), .j(reg_j), .k(reg_k), .men(reg_men), .q(reg_q));

  minmax_ff #(.W(W)) u_minmax (
    .clk(clk), .j(ff_j), .k(ff_k),
    .q(ff_q[FF_MINMAX]), .qn(ff_qn[FF_MINMAX]));

  algebraic_ff #(.W(W)) u_algebraic (
    .clk(clk), .j(ff_j), .k(ff_k),
    .q(ff_q[FF_ALGEBRAIC]), .qn(ff_qn[FF_ALGEBRAIC]));

  bounded_reset_ff #(.W(W)) u_bounded_reset (
    .clk(clk), .j(ff_j), .k(ff_k),
    .q(ff_q[FF_BOUNDED_RESET]), .qn(ff_qn[FF_BOUNDED_RESET]));

  bounded_set_ff #(.W(W)) u_bounded_set (
    .clk(clk), .j(ff_j), .k(ff_k),
    .q(ff_q[FF_BOUNDED_SET]), .qn(ff_qn[FF_BOUNDED_SET]));

endmodule
