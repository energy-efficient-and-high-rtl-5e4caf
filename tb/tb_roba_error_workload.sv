// tb_roba_error_workload: accuracy of the three RoBA forms.
//
// Runs every 8-bit operand pair through the S-RoBA, U-RoBA and AS-RoBA
// multipliers and measures the relative error |exact - approx| / |exact|
// (pairs with an exact product of zero are skipped). Expected:
//   - U-RoBA and S-RoBA: largest error exactly 1/9 (11.1 %), and the same
//     error for the same operand magnitudes, since both drop only the term
//     (Ar - A)(Br - B);
//   - AS-RoBA: largest error 100 %, reached only with an operand of -1;
//   - the extra error of AS-RoBA over S-RoBA shrinks as the operands widen
//     (a random sample of 16-bit pairs against all 8-bit pairs).
// Mean errors are printed for reference.
module tb_roba_error_workload;
  import roba_pkg::*;
  import roba_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p_s8, p_u8, p_as8;
  logic [15:0] a16, b16;
  logic [31:0] p_s16, p_as16;

  roba_multiplier #(.N(8),  .VARIANT(S_ROBA))  u_s8   (.a(a8),  .b(b8),  .p(p_s8));
  roba_multiplier #(.N(8),  .VARIANT(U_ROBA))  u_u8   (.a(a8),  .b(b8),  .p(p_u8));
  roba_multiplier #(.N(8),  .VARIANT(AS_ROBA)) u_as8  (.a(a8),  .b(b8),  .p(p_as8));
  roba_multiplier #(.N(16), .VARIANT(S_ROBA))  u_s16  (.a(a16), .b(b16), .p(p_s16));
  roba_multiplier #(.N(16), .VARIANT(AS_ROBA)) u_as16 (.a(a16), .b(b16), .p(p_as16));

  task automatic expect_true(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real rel_err(longint exact, longint approx);
    real e, d;
    e = (exact < 0) ? -exact : exact;
    d = (approx > exact) ? approx - exact : exact - approx;
    return d / e;
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static real max_s = 0, max_u = 0, max_as = 0, sum_s = 0, sum_u = 0, sum_as = 0;
    static real excess8 = 0, excess16 = 0;
    static int  n_s = 0, n_u = 0, n_as = 0, n16 = 0;
    static bit  as_max_only_minus_one = 1'b1;
    longint ex;
    real    es, eu, eas;

    for (longint i = 0; i < 256; i++) begin
      for (longint j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        ex = exact_val(i, j, 8, U_ROBA);
        if (ex != 0) begin
          eu = rel_err(ex, longint'(p_u8));
          sum_u += eu;
          n_u++;
          if (eu > max_u) max_u = eu;
        end
        ex = exact_val(i, j, 8, S_ROBA);
        if (ex != 0) begin
          es  = rel_err(ex, sext(longint'(p_s8), 16));
          eas = rel_err(ex, sext(longint'(p_as8), 16));
          sum_s  += es;
          sum_as += eas;
          excess8 += eas - es;
          n_s++;
          n_as++;
          if (es > max_s) max_s = es;
          if (eas > max_as) max_as = eas;
          if (eas >= 1.0 && sext(i, 8) != -1 && sext(j, 8) != -1) as_max_only_minus_one = 1'b0;
        end
      end
    end

    for (int k = 0; k < 50000; k++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      #1;
      ex = exact_val(longint'(a16), longint'(b16), 16, S_ROBA);
      if (ex != 0) begin
        excess16 += rel_err(ex, sext(longint'(p_as16), 32)) - rel_err(ex, sext(longint'(p_s16), 32));
        n16++;
      end
    end

    $display("8-bit U-RoBA : max error %f, mean %f", max_u, sum_u / n_u);
    $display("8-bit S-RoBA : max error %f, mean %f", max_s, sum_s / n_s);
    $display("8-bit AS-RoBA: max error %f, mean %f", max_as, sum_as / n_as);
    $display("mean extra error of AS-RoBA: 8-bit %f, 16-bit %f", excess8 / n_s, excess16 / n16);

    expect_true("U-RoBA max error is 1/9", (max_u * 9.0 > 0.999999) && (max_u * 9.0 < 1.000001));
    expect_true("S-RoBA max error is 1/9", (max_s * 9.0 > 0.999999) && (max_s * 9.0 < 1.000001));
    expect_true("AS-RoBA max error is 100 %", (max_as > 0.999999) && (max_as < 1.000001));
    expect_true("AS-RoBA 100 % error only with a -1 operand", as_max_only_minus_one);
    expect_true("AS-RoBA extra error shrinks with width", excess16 / n16 < excess8 / n_s);
    expect_true("AS-RoBA extra error is positive at 8 bits", excess8 > 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
