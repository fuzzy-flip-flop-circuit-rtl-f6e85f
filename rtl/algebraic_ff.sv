// algebraic_ff: algebraic type fuzzy J-K flip-flop.
//
// Next state, with values read as fractions x/M, M = 2^W-1:
//   Q+ = J + Q - J*Q - K*Q
// which stays within [0,1] for all inputs.  In integer form the numerator
//   N = M*J + M*Q - J*Q - K*Q        (0 <= N <= M*M)
// is computed exactly with two W x W multipliers, and Q+ = round(N / M).
// Since M is odd, N/M is never exactly halfway between two codes, so
// rounding to nearest is unambiguous.
//
// Interface and timing as minmax_ff: q is loaded on every rising clk edge,
// qn = M - q one clock later; clear the state by clocking J=0, K=M.
// The equation is the reference design's; the quantisation (round to the
// nearest code) and the circuit are this implementation's own choice.
module algebraic_ff #(
  parameter int unsigned W = fuzzy_pkg::FUZZY_W
) (
  input  logic         clk,
  input  logic [W-1:0] j,
  input  logic [W-1:0] k,
  output logic [W-1:0] q,
  output logic [W-1:0] qn
);

  localparam logic [W-1:0] ONE = '1;
  localparam int unsigned  NW  = 2 * W + 2;
  localparam logic [NW-1:0] M_N = NW'(ONE);

  logic [NW-1:0] num;
  logic [NW-1:0] quo;
  logic [W-1:0]  q_next;

  always_comb begin
    num    = M_N * NW'(j) + M_N * NW'(q) - NW'(j) * NW'(q) - NW'(k) * NW'(q);
    quo    = (num + (M_N >> 1)) / M_N;
    q_next = quo[W-1:0];
  end

  always_ff @(posedge clk) begin
    q  <= q_next;
    qn <= ONE - q;
  end

endmodule
