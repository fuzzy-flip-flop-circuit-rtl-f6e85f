// bounded_reset_ff: bounded reset type fuzzy J-K flip-flop.
//
// Built from the bounded product a (.) b = 0 max (a+b-1) and the bounded
// sum a (+) b = 1 min (a+b):
//   Q+ = (J (.) not Q) (+) (not K (.) Q) = 1 min {0 max (J-Q) + 0 max (Q-K)}
// With 1 as the all-ones code M = 2^W-1 this is exact in integers: two
// saturating subtractors, one adder and a clamp to M.  (The clamp follows
// the equation; a + b never exceeds max(J, Q), so it does not act for
// values inside the code range.)
//
// Interface and timing as minmax_ff: q is loaded on every rising clk edge,
// qn = M - q one clock later; clear the state by clocking J=0, K=M.
// The equation is the reference design's; the circuit is this
// implementation's own.
module bounded_reset_ff #(
  parameter int unsigned W = fuzzy_pkg::FUZZY_W
) (
  input  logic         clk,
  input  logic [W-1:0] j,
  input  logic [W-1:0] k,
  output logic [W-1:0] q,
  output logic [W-1:0] qn
);

  localparam logic [W-1:0] ONE = '1;

  logic [W-1:0] a, b;     // 0 max (J-Q), 0 max (Q-K)
  logic [W:0]   sum;
  logic [W-1:0] q_next;

  always_comb begin
    a      = (j > q) ? j - q : '0;
    b      = (q > k) ? q - k : '0;
    sum    = {1'b0, a} + {1'b0, b};
    q_next = (sum > {1'b0, ONE}) ? ONE : sum[W-1:0];
  end

  always_ff @(posedge clk) begin
    q  <= q_next;
    qn <= ONE - q;
  end

endmodule
