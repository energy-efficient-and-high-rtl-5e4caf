// tb_subtractor: the 17-bit subtractor.
//
// Edge values and random operands; expected diff = (a - b) mod 2^17 and
// borrow set exactly when b > a.
module tb_subtractor;
  int checks = 0, failures = 0;

  logic [16:0] a, b, diff;
  logic        borrow;

  subtractor #(.W(17)) dut (.a(a), .b(b), .diff(diff), .borrow(borrow));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply(longint x, longint y);
    a = 17'(x);
    b = 17'(y);
    #1;
    check($sformatf("%0d - %0d", x, y), diff, (x - y + 131072) % 131072);
    check($sformatf("%0d - %0d borrow", x, y), borrow, (y > x) ? 1 : 0);
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0);
    apply(0, 1);
    apply(65536, 65536);
    apply(65536, 1);
    apply(131071, 131071);
    apply(16973824 % 131072, 4096);
    for (int i = 0; i < 5000; i++) apply($urandom_range(131071), $urandom_range(131071));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
