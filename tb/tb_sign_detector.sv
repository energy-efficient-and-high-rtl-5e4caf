// tb_sign_detector: the product sign for all four operand sign pairs.
//
// Expected: negative exactly when the two operand signs differ.
module tb_sign_detector;
  int checks = 0, failures = 0;

  logic a_msb, b_msb, neg;

  sign_detector dut (.a_msb(a_msb), .b_msb(b_msb), .neg(neg));

  initial begin
    #10_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // (+,+) +, (+,-) -, (-,+) -, (-,-) +
    bit expected [4] = '{1'b0, 1'b1, 1'b1, 1'b0};
    for (int i = 0; i < 4; i++) begin
      a_msb = i[1];
      b_msb = i[0];
      #1;
      checks++;
      if (neg != expected[i]) begin
        failures++;
        $display("FAIL signs a=%0b b=%0b: got %0b", a_msb, b_msb, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
