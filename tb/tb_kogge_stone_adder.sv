// tb_kogge_stone_adder: the parallel-prefix adder.
//
// A 5-bit instance is tested exhaustively (both carry-in values) and a
// 17-bit instance (the width the 8-bit multiplier uses) with edge values
// that ripple a carry through every bit and with random operands.
// Expected: {cout, sum} = a + b + cin.
module tb_kogge_stone_adder;
  int checks = 0, failures = 0;

  logic [4:0]  a5, b5, s5;
  logic        c5, co5;
  logic [16:0] a17, b17, s17;
  logic        c17, co17;

  kogge_stone_adder #(.W(5))  dut5  (.a(a5),  .b(b5),  .cin(c5),  .sum(s5),  .cout(co5));
  kogge_stone_adder #(.W(17)) dut17 (.a(a17), .b(b17), .cin(c17), .sum(s17), .cout(co17));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply17(longint x, longint y, bit c);
    a17 = 17'(x);
    b17 = 17'(y);
    c17 = c;
    #1;
    check($sformatf("17-bit %0d + %0d + %0d", x, y, c), {co17, s17}, x + y + c);
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int c = 0; c < 2; c++) begin
          a5 = 5'(x);
          b5 = 5'(y);
          c5 = c[0];
          #1;
          check($sformatf("5-bit %0d + %0d + %0d", x, y, c), {co5, s5}, x + y + c);
        end
    apply17(131071, 1, 0);
    apply17(131071, 0, 1);
    apply17(131071, 131071, 1);
    apply17(65536, 65536, 0);
    apply17(0, 0, 0);
    for (int i = 0; i < 5000; i++)
      apply17($urandom_range(131071), $urandom_range(131071), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
