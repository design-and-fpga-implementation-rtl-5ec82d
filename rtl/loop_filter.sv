// loop_filter: first-order low-pass loop filter, H(z) = 1 / (z - 15/16).
//
// The 8-bit phase-detector output a is sign-extended and added to the fed-back
// state scaled by 15/16; the sum (Atemp, 12 bit) is registered (z^-1) and the
// register is the 12-bit output b. The 15/16 factor needs no multiplier:
// b * 15/16 = b - (b >>> 4). The DC gain is 1 / (1 - 15/16) = 16, so an
// 8-bit input (-128 .. 127) keeps the state within -2048 .. 2032 and the
// 12-bit register never overflows.
// Structure, coefficient, shift and widths follow the design description;
// the synchronous reset to zero and the floor rounding of the arithmetic
// shift are this design's choices.
//
// Interface: clk, rst (synchronous, active high), a (signed 8 bit) ->
// b (signed 12 bit). b[n+1] = a[n] + b[n] - floor(b[n] / 16). An assertion
// checks that the sum never wraps.
module loop_filter
  import fm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t a,     // loop input, from the phase detector
  output lf_t     b      // loop output Ve(n)
);

  lf_t atemp;
  lf_t fb;   // b * 15/16 (Atemp - E in the block diagram)

  always_comb begin
    fb    = b - (b >>> 4);
    atemp = LF_W'(a) + fb;
  end

  always_ff @(posedge clk) begin
    if (rst) b <= '0;
    else     b <= atemp;
  end

  // The DC gain of 16 keeps the 12-bit sum in range: it never wraps.
  a_no_wrap: assert property (@(posedge clk) disable iff (rst)
    !((a[SAMPLE_W-1] == fb[LF_W-1]) && (atemp[LF_W-1] != fb[LF_W-1])))
    else $error("loop filter sum wrapped");

endmodule
