// roba_pkg: shared types of the rounding-based approximate (RoBA) multiplier.
//
// The multiplier comes in three forms that differ only in how the operand
// and product signs are handled:
//   U_ROBA  - unsigned operands; no sign detector, modulus or sign-set stage.
//   S_ROBA  - two's complement operands; operands and product are negated
//             exactly (~x + 1).
//   AS_ROBA - two's complement operands; negation drops the +1 (one's
//             complement), trading accuracy for a shorter path.
// The three forms are those of the design; the encoding is this design's own.
package roba_pkg;

  typedef enum logic [1:0] {
    U_ROBA  = 2'd0,
    S_ROBA  = 2'd1,
    AS_ROBA = 2'd2
  } roba_variant_e;

endpackage
