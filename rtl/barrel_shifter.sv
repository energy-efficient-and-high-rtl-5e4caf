// barrel_shifter: multiplies an operand by 2^shamt with a logarithmic shifter.
//
// Because one factor of each RoBA partial product is a power of two, each
// product is a plain left shift. The shifter has one stage per bit of shamt;
// stage k shifts by 2^k when shamt[k] is set. When en is low (the rounded
// factor is zero) the output is zero.
// Interface: data (IW bits, unsigned) is zero-extended to OW bits; shamt is
// the exponent from the rounding block; y = en ? data << shamt : 0.
// Timing: combinational, SW levels of 2:1 multiplexers.
// A barrel shifter is what the design names; its stage structure and the
// enable input are this design's own.
module barrel_shifter #(
  parameter int unsigned IW = 8,
  parameter int unsigned OW = 17,
  parameter int unsigned SW = 4
) (
  input  logic [IW-1:0] data,
  input  logic [SW-1:0] shamt,
  input  logic          en,
  output logic [OW-1:0] y
);

  always_comb begin
    logic [OW-1:0] s;
    s = en ? OW'(data) : '0;
    for (int k = 0; k < SW; k++) begin
      if (shamt[k]) s = s << (1 << k);
    end
    y = s;
  end

endmodule
