// tb_rounding: exhaustive test of the nearest-power-of-two rounding block.
//
// Every 8-bit and every 16-bit input is applied; the rounded value must equal
// the nearest power of two found by a distance search (ties up, 3 -> 2,
// 0 -> 0), and the exponent output must be its base-2 logarithm. Also
// checks the worked values of the 16-bit simulation: 4280 -> 4096 and
// 3960 -> 4096, both with exponent 12.
module tb_rounding;
  import roba_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  x8;
  logic [8:0]  xr8;
  logic [3:0]  s8;
  logic [15:0] x16;
  logic [16:0] xr16;
  logic [4:0]  s16;

  rounding #(.N(8))  dut8  (.x(x8),  .xr(xr8),  .shamt(s8));
  rounding #(.N(16)) dut16 (.x(x16), .xr(xr16), .shamt(s16));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int i = 0; i < 256; i++) begin
      x8 = 8'(i);
      #1;
      e = round_pow2(i);
      check($sformatf("N=8 x=%0d value", i), xr8, e);
      if (i != 0) check($sformatf("N=8 x=%0d exponent", i), longint'(1) << s8, e);
    end
    for (int i = 0; i < 65536; i++) begin
      x16 = 16'(i);
      #1;
      e = round_pow2(i);
      check($sformatf("N=16 x=%0d value", i), xr16, e);
      if (i != 0) check($sformatf("N=16 x=%0d exponent", i), longint'(1) << s16, e);
    end
    x16 = 16'd4280; #1;
    check("4280 rounds to 4096", xr16, 4096);
    check("4280 exponent 12", s16, 12);
    x16 = 16'd3960; #1;
    check("3960 rounds to 4096", xr16, 4096);
    check("3960 exponent 12", s16, 12);
    x8 = 8'd3; #1;
    check("3 rounds to 2", xr8, 2);
    x8 = 8'd6; #1;
    check("6 rounds to 8", xr8, 8);
    x8 = 8'd255; #1;
    check("255 rounds to 256", xr8, 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
