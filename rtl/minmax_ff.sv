// minmax_ff: min-max type fuzzy J-K flip-flop.
//
// Next state, with "1" the all-ones code M = 2^W-1, max for "or", min for
// "and" and M-x for "not":
//   Q+ = (J max (M-K)) min (J max Q) min ((M-K) max (M-Q))
// Three magnitude comparisons pick the three maxima (u1, u2, u3) and two
// more pick the smallest of them, so the datapath is five W-bit comparators,
// complementers and multiplexers in front of a W-bit register.
//
// Interface: clk; J and K inputs j, k; state q and its complement qn.
// Timing: q takes the new state on every rising edge of clk (one cycle from
// j/k to q).  qn is registered on the same edge from the state held before
// the edge, so qn = M - q one clock later, exactly as the reference circuit
// does (its complement register is loaded from the old state).
// There is no reset input: as in the reference circuit, the state is
// cleared by clocking J=0, K=M (reset) once; qn follows one clock after.
// The equation and the 4-bit width follow the reference design; the
// register-level structure is this implementation's own.
module minmax_ff #(
  parameter int unsigned W = fuzzy_pkg::FUZZY_W
) (
  input  logic         clk,
  input  logic [W-1:0] j,
  input  logic [W-1:0] k,
  output logic [W-1:0] q,
  output logic [W-1:0] qn
);

  localparam logic [W-1:0] ONE = '1;

  logic [W-1:0] k_c, q_c;       // complements M-K and M-Q
  logic [W-1:0] u1, u2, u3;     // the three "or" terms
  logic [W-1:0] u12;            // min(u1, u2)
  logic [W-1:0] q_next;

  always_comb begin
    k_c    = ONE - k;
    q_c    = ONE - q;
    u1     = (j > k_c) ? j : k_c;
    u2     = (j > q) ? j : q;
    u3     = (k_c > q_c) ? k_c : q_c;
    u12    = (u1 < u2) ? u1 : u2;
    q_next = (u12 < u3) ? u12 : u3;
  end

  always_ff @(posedge clk) begin
    q  <= q_next;
    qn <= ONE - q;
  end

endmodule
