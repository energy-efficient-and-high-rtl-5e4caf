// subtractor: W-bit subtractor, diff = a - b (mod 2^W).
//
// Built as a + ~b + 1 on the Kogge-Stone adder, so it has the same
// logarithmic carry path as the adder ahead of it. borrow is set when
// b > a (no carry out of the addition).
// Interface: a, b unsigned; diff, borrow.
// Timing: combinational, one inverter row plus the adder.
// The design only names a subtractor; building it on the parallel-prefix
// adder is this design's own choice.
module subtractor #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff,
  output logic         borrow
);

  logic cout;

  kogge_stone_adder #(.W(W)) u_add (
    .a   (a),
    .b   (~b),
    .cin (1'b1),
    .sum (diff),
    .cout(cout)
  );

  assign borrow = ~cout;

endmodule
