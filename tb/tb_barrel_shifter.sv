// tb_barrel_shifter: the power-of-two shifter used for the three products.
//
// With an 8-bit input, 17-bit output and 4-bit exponent, every data value
// is shifted by every exponent 0..8 with the enable set, and a sample with
// the enable clear. Expected: data * 2^shamt, or 0 when disabled.
module tb_barrel_shifter;
  int checks = 0, failures = 0;

  logic [7:0]  data;
  logic [3:0]  shamt;
  logic        en;
  logic [16:0] y;

  barrel_shifter #(.IW(8), .OW(17), .SW(4)) dut (.data(data), .shamt(shamt), .en(en), .y(y));

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
    for (int d = 0; d < 256; d++) begin
      for (int s = 0; s <= 8; s++) begin
        data  = 8'(d);
        shamt = 4'(s);
        en    = 1'b1;
        #1;
        check($sformatf("%0d << %0d", d, s), int'(y), d * (1 << s));
        if (s == d % 9) begin
          en = 1'b0;
          #1;
          check($sformatf("%0d << %0d disabled", d, s), int'(y), 0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
