// tb_modulus: exhaustive test of the operand magnitude block.
//
// All 256 8-bit patterns are applied to an exact and an approximate
// instance. Expected: |x| for the exact one; for the approximate one a
// negative x gives |x| - 1 (so -1 gives 0 and -128 gives 127).
module tb_modulus;
  int checks = 0, failures = 0;

  logic [7:0] x, mag_e, mag_a;

  modulus #(.N(8), .EXACT(1'b1)) dut_exact  (.x(x), .mag(mag_e));
  modulus #(.N(8), .EXACT(1'b0)) dut_approx (.x(x), .mag(mag_a));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -128; v < 128; v++) begin
      x = 8'(v);
      #1;
      check($sformatf("exact |%0d|", v), mag_e, (v < 0) ? -v : v);
      check($sformatf("approx |%0d|", v), mag_a, (v < 0) ? -v - 1 : v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
