// roba_multiplier: rounding-based approximate (RoBA) N x N multiplier.
//
// Each operand is rounded to its nearest power of two, Ar = 2^sa and
// Br = 2^sb. The exact identity
//     A*B = (Ar - A)(Br - B) + Ar*B + Br*A - Ar*Br
// is used without its first term, which is small when the operands are close
// to their rounded values, so
//     P ~= Ar*B + Br*A - Ar*Br = (B << sa) + (A << sb) - (Ar << sb)
// needs only three shifts, one addition and one subtraction. The worst-case
// relative error of the magnitude is 1/9 (11.1 %), reached when both
// operands are of the form 3 * 2^k.
//
// Datapath (all combinational):
//   modulus (x2) -> rounding (x2) -> three barrel shifters -> Kogge-Stone
//   adder (Ar*B + Br*A) -> subtractor (- Ar*Br) -> sign set -> p
//   sign detector (A[N-1] ^ B[N-1]) -> sign set
// VARIANT selects the form (see roba_pkg): U_ROBA treats a and b as unsigned
// and has no modulus, sign detector or sign set; S_ROBA negates exactly;
// AS_ROBA negates operands and product with one's complement only.
//
// Interface: a, b are N-bit operands (two's complement unless U_ROBA); p is
// the 2N-bit product (two's complement unless U_ROBA).
// Timing: purely combinational, no clock; a new product is valid one
// propagation delay after the operands change.
//
// Follows the design: the equation, the rounding rule, the block order and
// the three variants. This design's own choices: a 2N-bit product (one of
// the block drawings labels the output P[N-1:0], but the simulated 16-bit
// products are 32 bits wide), an internal width of 2N+1 bits for the shifted
// terms and their sum, and applying the AS-RoBA shortcut to both the operand
// and the product negation.
module roba_multiplier
  import roba_pkg::*;
#(
  parameter int unsigned   N       = 8,
  parameter roba_variant_e VARIANT = S_ROBA
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned W     = 2 * N + 1;       // shifted terms and their sum
  localparam int unsigned SW    = $clog2(N + 1);   // exponent width
  localparam bit          EXACT = (VARIANT != AS_ROBA);

  logic [N-1:0]   am, bm;        // operand magnitudes
  logic [N:0]     ar, br;        // rounded magnitudes
  logic [SW-1:0]  sa, sb;        // their exponents
  logic           nza, nzb;      // rounded magnitude non-zero
  logic [W-1:0]   arb, bra, arbr;// Ar*B, Br*A, Ar*Br
  logic [W-1:0]   sum, diff;
  logic           sum_cout, diff_borrow;
  logic [2*N-1:0] umag;

  // ---- Operand magnitudes, product sign and sign set -----------------------
  // U-RoBA has none of these: the operands are the magnitudes and the
  // unsigned result is the product.
  if (VARIANT == U_ROBA) begin : g_unsigned
    assign am = a;
    assign bm = b;
    assign p  = umag;
  end else begin : g_signed
    logic neg;  // product sign
    modulus #(.N(N), .EXACT(EXACT)) u_mod_a (.x(a), .mag(am));
    modulus #(.N(N), .EXACT(EXACT)) u_mod_b (.x(b), .mag(bm));
    sign_detector u_sign_det (.a_msb(a[N-1]), .b_msb(b[N-1]), .neg(neg));
    sign_set #(.W(2*N), .EXACT(EXACT)) u_sign_set (.mag(umag), .neg(neg), .p(p));
  end

  // ---- Rounding to the nearest power of two ------------------------------
  rounding #(.N(N)) u_round_a (.x(am), .xr(ar), .shamt(sa));
  rounding #(.N(N)) u_round_b (.x(bm), .xr(br), .shamt(sb));

  // A zero operand rounds to zero; its exponent then reads 0, so the
  // shifters that use it are disabled instead.
  assign nza = |ar;
  assign nzb = |br;

  // ---- Three shifters replace the three products -------------------------
  barrel_shifter #(.IW(N),   .OW(W), .SW(SW)) u_sh_arb  (.data(bm), .shamt(sa), .en(nza), .y(arb));
  barrel_shifter #(.IW(N),   .OW(W), .SW(SW)) u_sh_bra  (.data(am), .shamt(sb), .en(nzb), .y(bra));
  barrel_shifter #(.IW(N+1), .OW(W), .SW(SW)) u_sh_arbr (.data(ar), .shamt(sb), .en(nzb), .y(arbr));

  // ---- Ar*B + Br*A - Ar*Br -----------------------------------------------
  kogge_stone_adder #(.W(W)) u_add (
    .a(arb), .b(bra), .cin(1'b0), .sum(sum), .cout(sum_cout)
  );
  subtractor #(.W(W)) u_sub (
    .a(sum), .b(arbr), .diff(diff), .borrow(diff_borrow)
  );

  // The approximate magnitude is below 2^(2N) for every operand pair and the
  // sum never wraps, so the top bit, the carry and the borrow are always 0.
  always_comb begin
    assert (!diff[W-1] && !sum_cout && !diff_borrow)
      else $error("roba_multiplier: intermediate result out of range");
  end

  assign umag = diff[2*N-1:0];

endmodule
