// tb_sign_set: the output negation stage, exact and approximate.
//
// For 16-bit magnitudes (edge values and random ones) and both signs:
// a positive product passes unchanged; a negative one becomes -mag in the
// exact form and -mag - 1 in the approximate form, modulo 2^16.
module tb_sign_set;
  int checks = 0, failures = 0;

  logic [15:0] mag, p_e, p_a;
  logic        neg;

  sign_set #(.W(16), .EXACT(1'b1)) dut_exact  (.mag(mag), .neg(neg), .p(p_e));
  sign_set #(.W(16), .EXACT(1'b0)) dut_approx (.mag(mag), .neg(neg), .p(p_a));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply(int m);
    for (int s = 0; s < 2; s++) begin
      mag = 16'(m);
      neg = s[0];
      #1;
      check($sformatf("exact neg=%0d mag=%0d", s, m), int'(p_e),
            s[0] ? ((65536 - m) % 65536) : m);
      check($sformatf("approx neg=%0d mag=%0d", s, m), int'(p_a),
            s[0] ? (65535 - m) : m);
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
    apply(0);
    apply(1);
    apply(16384);
    apply(32767);
    apply(65535);
    for (int i = 0; i < 3000; i++) apply(int'($urandom_range(65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
