// sign_detector: sign of the product of two two's complement operands.
//
// The product is negative exactly when one of the two operands is negative,
// so the detector looks only at the operands' most significant bits and
// returns their exclusive-or. The sign-set stage at the output of the
// multiplier uses this bit to decide whether to negate the unsigned result.
// Interface: a_msb, b_msb are bit N-1 of A and B; neg is the product sign.
// Timing: purely combinational, one gate level.
// The block and its place follow the design; that a zero operand still
// yields neg = 1 when the other operand is negative is this design's choice
// (the sign-set stage then negates a zero magnitude, which is exact in the
// exact form and gives -1 in the approximate form).
module sign_detector (
  input  logic a_msb,
  input  logic b_msb,
  output logic neg
);

  always_comb neg = a_msb ^ b_msb;

endmodule
