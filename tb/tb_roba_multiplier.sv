// tb_roba_multiplier: end-to-end test of the RoBA multiplier in all forms.
//
// Four instances run side by side: 8-bit S-RoBA, U-RoBA and AS-RoBA, and
// 16-bit S-RoBA. The 8-bit ones see every operand pair; the 16-bit one sees
// the worked examples (4280 x 3960 with its intermediate products and
// exponents, 21767 x 3925, 26176 x 30507, 32767 x 32575, 90 x 145) and random
// pairs. Every product is compared with the integer reference model.
// For the exact forms the relative error |exact - approx| / |exact| must
// never exceed 1/9 and must reach it.
// Each mechanism of the design is counted and must occur at least once:
// rounding up, rounding down, a half-way value rounded up, the 3 -> 2
// exception, a zero operand, a negated (negative) product, two negative
// operands, results above, below and equal to the exact product, the
// worst-case 1/9 error, and the AS-RoBA -1 operand that rounds to nothing.
module tb_roba_multiplier;
  import roba_pkg::*;
  import roba_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p_s8, p_u8, p_as8;
  logic [15:0] a16, b16;
  logic [31:0] p_s16;

  roba_multiplier #(.N(8),  .VARIANT(S_ROBA))  u_s8  (.a(a8),  .b(b8),  .p(p_s8));
  roba_multiplier #(.N(8),  .VARIANT(U_ROBA))  u_u8  (.a(a8),  .b(b8),  .p(p_u8));
  roba_multiplier #(.N(8),  .VARIANT(AS_ROBA)) u_as8 (.a(a8),  .b(b8),  .p(p_as8));
  roba_multiplier #(.N(16), .VARIANT(S_ROBA))  u_s16 (.a(a16), .b(b16), .p(p_s16));

  // Mechanism counters.
  typedef enum int {
    M_ROUND_UP, M_ROUND_DOWN, M_HALFWAY_UP, M_THREE_DOWN, M_ZERO_OPERAND,
    M_NEG_PRODUCT, M_BOTH_NEG, M_ABOVE_EXACT, M_BELOW_EXACT, M_EQUAL_EXACT,
    M_WORST_ERROR, M_AS_MINUS_ONE, M_COUNT
  } mech_e;
  int    mech [M_COUNT];
  string mech_name [M_COUNT] = '{
    "round up", "round down", "half-way value rounded up", "3 rounded to 2",
    "zero operand", "negated product", "both operands negative",
    "result above exact", "result below exact", "result equal to exact",
    "worst-case 1/9 error", "AS-RoBA -1 operand"};

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Counts the rounding mechanisms seen by one operand magnitude.
  function automatic void count_operand(longint m);
    longint r;
    r = round_pow2(m);
    if (m == 0) mech[M_ZERO_OPERAND]++;
    else if (r > m) mech[M_ROUND_UP]++;
    else if (r < m) mech[M_ROUND_DOWN]++;
    if (m == 3) mech[M_THREE_DOWN]++;
    if (m >= 6 && r > m && (r - m) * 4 == r) mech[M_HALFWAY_UP]++;
  endfunction

  // Checks |exact - approx| <= exact / 9 and counts how the result compares.
  function automatic void error_bound(string what, longint exact, longint approx);
    longint e, d;
    e = (exact < 0) ? -exact : exact;
    d = (approx > exact) ? approx - exact : exact - approx;
    if (approx > exact)      mech[M_ABOVE_EXACT]++;
    else if (approx < exact) mech[M_BELOW_EXACT]++;
    else                     mech[M_EQUAL_EXACT]++;
    checks++;
    if (9 * d > e) begin
      failures++;
      if (failures < 20) $display("FAIL %s: error %0d of %0d exceeds 1/9", what, d, exact);
    end
    if (e != 0 && 9 * d == e) mech[M_WORST_ERROR]++;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sa, sb;

    // ---- 8-bit, all operand pairs, three forms ----------------------------
    for (longint i = 0; i < 256; i++) begin
      for (longint j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        check($sformatf("S8 %0d x %0d", sext(i, 8), sext(j, 8)), p_s8, roba_ref(i, j, 8, S_ROBA));
        check($sformatf("U8 %0d x %0d", i, j), p_u8, roba_ref(i, j, 8, U_ROBA));
        check($sformatf("AS8 %0d x %0d", sext(i, 8), sext(j, 8)), p_as8, roba_ref(i, j, 8, AS_ROBA));
        error_bound($sformatf("U8 %0d x %0d", i, j),
                    exact_val(i, j, 8, U_ROBA), longint'(p_u8));
        error_bound($sformatf("S8 %0d x %0d", sext(i, 8), sext(j, 8)),
                    exact_val(i, j, 8, S_ROBA), sext(longint'(p_s8), 16));
        sa = sext(i, 8);
        sb = sext(j, 8);
        count_operand(i);
        if ((sa < 0) != (sb < 0) && sa != 0 && sb != 0) mech[M_NEG_PRODUCT]++;
        if (sa < 0 && sb < 0) mech[M_BOTH_NEG]++;
        if (sa == -1 && sb > 1) begin
          // |-1| becomes 0 in AS-RoBA, so the product collapses to -1
          mech[M_AS_MINUS_ONE]++;
          check($sformatf("AS8 -1 x %0d", sb), sext(longint'(p_as8), 16), -1);
        end
      end
    end

    // ---- 16-bit worked examples ------------------------------------------
    a16 = 16'd4280;
    b16 = 16'd3960;
    #1;
    check("S16 4280 x 3960 exponent of A", u_s16.sa, 12);
    check("S16 4280 x 3960 exponent of B", u_s16.sb, 12);
    check("S16 4280 x 3960 Ar*B", u_s16.arb, 16220160);
    check("S16 4280 x 3960 Br*A", u_s16.bra, 17530880);
    check("S16 4280 x 3960 Ar*Br", u_s16.arbr, 16777216);
    check("S16 4280 x 3960", p_s16, 16973824);

    a16 = 16'd21767;
    b16 = 16'd3925;
    #1;
    check("S16 21767 x 3925", p_s16, 86355968);
    a16 = 16'd26176;
    b16 = 16'd30507;
    #1;
    check("S16 26176 x 30507", p_s16, 783646720);
    a16 = 16'd32767;
    b16 = 16'd32575;
    #1;
    check("S16 32767 x 32575", p_s16, 1067384832);
    a16 = 16'd90;
    b16 = 16'd145;
    #1;
    check("S16 90 x 145", p_s16, 12608);
    a8 = 8'd90;
    b8 = 8'd145;
    #1;
    check("U8 90 x 145", p_u8, 12608);

    // ---- 16-bit random and corner pairs ----------------------------------
    for (int k = 0; k < 20000; k++) begin
      longint x, y;
      case (k)
        0: begin x = 16'h8000; y = 16'h8000; end
        1: begin x = 16'h8000; y = 16'h7fff; end
        2: begin x = 16'hffff; y = 16'h0003; end
        3: begin x = 16'h0000; y = 16'h1234; end
        default: begin x = $urandom_range(65535); y = $urandom_range(65535); end
      endcase
      a16 = 16'(x);
      b16 = 16'(y);
      #1;
      check($sformatf("S16 %0d x %0d", sext(x, 16), sext(y, 16)), p_s16, roba_ref(x, y, 16, S_ROBA));
      error_bound($sformatf("S16 %0d x %0d", sext(x, 16), sext(y, 16)),
                  exact_val(x, y, 16, S_ROBA), sext(longint'(p_s16), 32));
    end

    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-28s seen %0d times", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_name[m]);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
