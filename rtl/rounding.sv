// rounding: rounds an unsigned N-bit value to the nearest power of two.
//
// Let k be the position of the leading one of x. The candidates are 2^k and
// 2^(k+1); bit k-1 tells which is nearer. A value exactly half way,
// 3 * 2^(k-1), is rounded up, which lets bit k-1 alone decide and keeps the
// logic small; the one exception is x = 3, which rounds down to 2. Zero
// stays zero.
// Bit j of the one-hot result is therefore set when
//   - the leading one is at j and bit j-1 is clear (j >= 2), or the leading
//     one is at j and j < 2 (1 -> 1, 2 and 3 -> 2); or
//   - the leading one is at j-1, bit j-2 is set and j-1 >= 2 (round up).
// Outputs: xr, the rounded value (N+1 bits, since an N-bit value can round
// up to 2^N); shamt, its exponent, which drives the barrel shifters. For
// x = 0, xr is zero and shamt is 0; users tell this case apart by |xr.
// Timing: combinational; a prefix-OR chain finds the leading one, then two
// gate levels per bit and a one-hot to binary encoder.
// The rounding rule follows the design; the bit-level form and the separate
// exponent output are this design's own.
module rounding #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]               x,
  output logic [N:0]                 xr,
  output logic [$clog2(N+1)-1:0]     shamt
);

  localparam int unsigned SW = $clog2(N + 1);

  logic [N:1]   hi;    // hi[j]: some bit at or above j is set
  logic [N-1:0] lead;  // lead[j]: bit j is the leading one

  assign hi[N] = 1'b0;

  for (genvar j = 0; j < N; j++) begin : g_lead
    if (j >= 1) begin : g_hi
      assign hi[j] = hi[j+1] | x[j];
    end
    assign lead[j] = x[j] & ~hi[j+1];
  end

  for (genvar j = 0; j <= N; j++) begin : g_bit
    logic keep, up;
    if (j >= 2 && j < N) begin : g_keep_cmp
      assign keep = lead[j] & ~x[j-1];
    end else if (j < N) begin : g_keep_low
      assign keep = lead[j];
    end else begin : g_keep_none
      assign keep = 1'b0;
    end
    if (j >= 3) begin : g_up
      assign up = lead[j-1] & x[j-2];
    end else begin : g_up_none
      assign up = 1'b0;
    end
    assign xr[j] = keep | up;
  end

  always_comb begin
    shamt = '0;
    for (int j = 0; j <= N; j++) begin
      if (xr[j]) shamt |= SW'(j);
    end
  end

endmodule
