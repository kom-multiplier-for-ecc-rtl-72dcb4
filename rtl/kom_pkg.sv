// kom_pkg: constants and types shared by the Karatsuba-Ofman GF(p) multiplier.
//
// KOM_FIELD_BITS is the operand width of the main configuration, a 191-bit
// prime field. KOM_LEAF_BITS is the operand width at which the recursive
// multiplier stops splitting; the algorithm recurses all the way down to
// one-bit multipliers (AND gates). kom_state_e is the sequencer state of the
// top-level modular multiplier.
package kom_pkg;

  localparam int unsigned KOM_FIELD_BITS = 191;
  localparam int unsigned KOM_LEAF_BITS  = 1;

  typedef enum logic [1:0] {
    KOM_IDLE   = 2'd0,  // waiting for start
    KOM_MUL    = 2'd1,  // Karatsuba-Ofman product settles, reduction is launched
    KOM_REDUCE = 2'd2   // product is being reduced modulo p
  } kom_state_e;

endpackage
