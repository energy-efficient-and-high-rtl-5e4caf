// modulus: magnitude of an N-bit two's complement operand.
//
// A negative operand is negated so the rounding and shifting stages only see
// unsigned values. The exact form computes ~x + 1; the approximate form
// (EXACT = 0, used by the AS-RoBA multiplier) skips the increment and returns
// ~x, which is one less than the true magnitude (so -1 becomes 0).
// The output is N bits wide and unsigned: the magnitude of the most negative
// value, 2^(N-1), still fits.
// Interface: x is the operand, mag its magnitude.
// Timing: combinational; an inverter row followed by an N-bit incrementer in
// the exact form.
// The exact/approximate negation follows the design; the parameterisation is
// this design's own.
module modulus #(
  parameter int unsigned N     = 8,
  parameter bit          EXACT = 1'b1
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] mag
);

  logic [N-1:0] inv;

  always_comb begin
    inv = ~x;
    if (!x[N-1])    mag = x;
    else if (EXACT) mag = inv + N'(1);
    else            mag = inv;
  end

endmodule
