// kogge_stone_adder: W-bit parallel-prefix adder of the Kogge-Stone kind.
//
// Bit generate (a & b) and propagate (a ^ b) signals are combined in
// ceil(log2 W) prefix levels; at level l every bit i >= 2^l merges its
// group (g, p) with that of bit i - 2^l, so every bit's carry is ready
// after log2 W levels with fan-out of at most two per node. The carry into
// bit i+1 is then G[i:0] | (P[i:0] & cin).
// Interface: sum = a + b + cin (mod 2^W), cout the carry out.
// Timing: combinational, log2(W) + 2 gate levels.
// The design names a Kogge-Stone adder; this implementation of it is this
// design's own.
module kogge_stone_adder #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  always_comb begin
    logic [W-1:0] g, p, gn, pn;
    g = a & b;
    p = a ^ b;
    for (int d = 1; d < int'(W); d = d * 2) begin
      gn = g;
      pn = p;
      for (int i = d; i < int'(W); i++) begin
        gn[i] = g[i] | (p[i] & g[i-d]);
        pn[i] = p[i] & p[i-d];
      end
      g = gn;
      p = pn;
    end
    c    = {g | (p & {W{cin}}), cin};
    sum  = (a ^ b) ^ c[W-1:0];
    cout = c[W];
  end

endmodule
