// sign_set: applies the product sign to the unsigned RoBA result.
//
// When the sign detector reports a negative product, the W-bit magnitude is
// negated. The exact form (S-RoBA) uses ~x + 1; the approximate form
// (EXACT = 0, AS-RoBA) omits the increment, so a negative result comes out
// one lower than the exact two's complement value.
// Interface: mag is the unsigned result of the subtractor, neg the product
// sign, p the signed product.
// Timing: combinational; an inverter row, a W-bit incrementer (exact form)
// and a 2:1 multiplexer.
// The function follows the design; the parameterisation is this design's own.
module sign_set #(
  parameter int unsigned W     = 16,
  parameter bit          EXACT = 1'b1
) (
  input  logic [W-1:0] mag,
  input  logic         neg,
  output logic [W-1:0] p
);

  logic [W-1:0] inv;

  always_comb begin
    inv = ~mag;
    if (!neg)       p = mag;
    else if (EXACT) p = inv + W'(1);
    else            p = inv;
  end

endmodule
