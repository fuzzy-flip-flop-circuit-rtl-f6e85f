// fuzzy_register: a register of N fuzzy flip-flops.
//
// All cells share the clock and the K input.  The J input of cell i comes
// from a 2-to-1 multiplexer per bit, built as two levels of 2-input NAND
// gates with one inverter on the select line S1:
//   S1 = 1 : cell i takes its own membership input men[i]
//   S1 = 0 : every cell takes the common input j
// For min-max cells, K = 0 makes each cell take max(J, Q) ("or" with the
// old state), so clearing the register (S1 = 0, J = 0, K = M) and then
// clocking S1 = 1, K = 0 loads the N membership values exactly.  With
// S1 = 0 the common J/K act on every cell at once: J=K=0 holds, J=M,K=0
// sets, J=0,K=M resets and J=K=M inverts the whole register.
//
// Interface: clk, s1, common j and k, membership inputs men[0..N-1],
// states q[0..N-1].  Timing: q[i] is loaded on every rising clk edge from
// the inputs present before it (one cycle latency); there is no separate
// enable, so a cell keeps its value only under J=K=0 on its inputs.
// The cells' complement outputs are not brought out, as in the reference
// circuit.
//
// From the reference design: the shared CLK and K, the per-cell membership
// inputs, the S1-controlled NAND-NAND selection of each cell's J input and
// the 4-bit width; N defaults to the 11-cell register built for practical
// use (its circuit drawing shows 4 cells).  Which S1 level selects the
// membership inputs, and the FF_TYPE option, are this implementation's
// choices; FF_TYPE defaults to the min-max type the reference design uses.
module fuzzy_register
  import fuzzy_pkg::*;
#(
  parameter int unsigned W       = FUZZY_W,
  parameter int unsigned N       = 11,
  parameter ff_type_e    FF_TYPE = FF_MINMAX
) (
  input  logic         clk,
  input  logic         s1,
  input  logic [W-1:0] j,
  input  logic [W-1:0] k,
  input  logic [W-1:0] men [N],
  output logic [W-1:0] q   [N]
);

  logic         s1_n;
  logic [W-1:0] j_cell [N];
  logic [W-1:0] qn_cell [N];   // complement outputs, not used by the register

  assign s1_n = ~s1;

  for (genvar i = 0; i < N; i++) begin : g_cell
    // Bitwise NAND-NAND multiplexer: ~(~(men & s1) & ~(j & ~s1)).
    logic [W-1:0] nand_men, nand_j;
    assign nand_men  = ~(men[i] & {W{s1}});
    assign nand_j    = ~(j & {W{s1_n}});
    assign j_cell[i] = ~(nand_men & nand_j);

    if (FF_TYPE == FF_MINMAX) begin : g_ff
      minmax_ff #(.W(W)) u_ff (
        .clk(clk), .j(j_cell[i]), .k(k), .q(q[i]), .qn(qn_cell[i]));
    end else if (FF_TYPE == FF_ALGEBRAIC) begin : g_ff
      algebraic_ff #(.W(W)) u_ff (
        .clk(clk), .j(j_cell[i]), .k(k), .q(q[i]), .qn(qn_cell[i]));
    end else if (FF_TYPE == FF_BOUNDED_RESET) begin : g_ff
      bounded_reset_ff #(.W(W)) u_ff (
        .clk(clk), .j(j_cell[i]), .k(k), .q(q[i]), .qn(qn_cell[i]));
    end else begin : g_ff
      bounded_set_ff #(.W(W)) u_ff (
        .clk(clk), .j(j_cell[i]), .k(k), .q(q[i]), .qn(qn_cell[i]));
    end
  end

endmodule
