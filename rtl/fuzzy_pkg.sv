// fuzzy_pkg: shared types of the fuzzy flip-flop family.
//
// A fuzzy value is an unsigned W-bit number; 0 stands for membership 0 and
// the all-ones code (2^W-1) for membership 1.  The four flip-flop types of
// the family all extend the binary J-K flip-flop: J=K=0 holds the state,
// J=1,K=0 sets it to 1, J=0,K=1 resets it to 0 and J=K=1 inverts it.
// They differ in the fuzzy operators used for "and", "or" and "not".
package fuzzy_pkg;

  // Selects which fuzzy flip-flop type a register is built from.
  typedef enum logic [1:0] {
    FF_MINMAX        = 2'd0,  // min / max operators
    FF_ALGEBRAIC     = 2'd1,  // algebraic product / sum
    FF_BOUNDED_RESET = 2'd2,  // bounded operators, reset-dominant form
    FF_BOUNDED_SET   = 2'd3   // bounded operators, set-dominant form
  } ff_type_e;

  localparam int unsigned NUM_FF_TYPES = 4;

  // Default resolution of a fuzzy value, in bits.
  localparam int unsigned FUZZY_W = 4;

endpackage
