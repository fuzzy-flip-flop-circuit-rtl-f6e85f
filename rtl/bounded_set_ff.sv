// bounded_set_ff: bounded set type fuzzy J-K flip-flop.
//
// Built from the bounded sum a (+) b = 1 min (a+b) and the bounded product
// a (.) b = 0 max (a+b-1):
//   Q+ = (J (+) Q) (.) (not K (+) not Q)
//      = 0 max {1 min (J+Q) + 1 min (2-K-Q) - 1}
// With 1 as the all-ones code M = 2^W-1 this is exact in integers: two
// saturating adders, one adder and a floor at 0.
//
// Interface and timing as minmax_ff: q is loaded on every rising clk edge,
// qn = M - q one clock later; clear the state by clocking J=0, K=M.
// The equation is the reference design's; the circuit is this
// implementation's own.
module bounded_set_ff #(
  parameter int unsigned W = fuzzy_pkg::FUZZY_W
) (
  input  logic         clk,
  input  logic [W-1:0] j,
  input  logic [W-1:0] k,
  output logic [W-1:0] q,
  output logic [W-1:0] qn
);

  localparam logic [W-1:0] ONE = '1;

  logic [W:0]   jq, kq;   // J+Q and (M-K)+(M-Q), one bit wider
  logic [W-1:0] s1, s2;   // the two bounded sums
  logic [W:0]   t;
  logic [W-1:0] q_next;

  always_comb begin
    jq     = {1'b0, j} + {1'b0, q};
    kq     = {1'b0, ONE - k} + {1'b0, ONE - q};
    s1     = (jq > {1'b0, ONE}) ? ONE : jq[W-1:0];
    s2     = (kq > {1'b0, ONE}) ? ONE : kq[W-1:0];
    t      = {1'b0, s1} + {1'b0, s2};
    q_next = (t > {1'b0, ONE}) ? W'(t - {1'b0, ONE}) : '0;
  end

  always_ff @(posedge clk) begin
    q  <= q_next;
    qn <= ONE - q;
  end

endmodule
