// tb_roba_full: the multiplier at its default size and form (8-bit S-RoBA).
//
// All 65536 operand pairs are applied. Each product must match the integer
// reference model, and its relative error against the exact product must
// stay within 1/9 (11.1 %); the largest error seen must be exactly 1/9.
module tb_roba_full;
  import roba_pkg::*;
  import roba_ref_pkg::*;

  int checks = 0, failures = 0;
  int worst = 0;   // pairs whose error is exactly 1/9

  logic [7:0]  a, b;
  logic [15:0] p;

  roba_multiplier dut (.a(a), .b(b), .p(p));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exact, approx, e, d;
    for (longint i = 0; i < 256; i++) begin
      for (longint j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (longint'(p) != roba_ref(i, j, 8, S_ROBA)) begin
          failures++;
          if (failures < 20)
            $display("FAIL %0d x %0d: got %0d expected %0d", sext(i, 8), sext(j, 8),
                     sext(longint'(p), 16), roba_val(i, j, 8, S_ROBA));
        end
        exact  = exact_val(i, j, 8, S_ROBA);
        approx = sext(longint'(p), 16);
        e = (exact < 0) ? -exact : exact;
        d = (approx > exact) ? approx - exact : exact - approx;
        checks++;
        if (9 * d > e) begin
          failures++;
          if (failures < 20) $display("FAIL %0d x %0d: error above 1/9", sext(i, 8), sext(j, 8));
        end
        if (e != 0 && 9 * d == e) worst++;
      end
    end
    $display("pairs with the worst-case error of 1/9: %0d", worst);
    checks++;
    if (worst == 0) begin
      failures++;
      $display("FAIL the worst-case error of 1/9 was never reached");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
