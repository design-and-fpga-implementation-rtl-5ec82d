// loop_gain: loop amplifier between the loop filter and the NCO, A = 1/1024.
//
// Turns the 12-bit loop filter output Ve(n) into the 18-bit signed frequency
// correction Vd(n) added to the NCO phase increment. The gain is 1/1024 of a
// cosine-ROM address step per unit of Ve: the 18-bit accumulator carries
// ACC_W - ADDR_W = 8 fraction bits below the 10-bit address, so the
// correction is Ve sign-extended to 18 bits and divided by 2^(GAIN_LOG2 - 8)
// = 4, rounded to nearest (half rounds up): vd = (ve + 2) >>> 2. Rounding
// rather than truncating keeps the correction free of a -1/2 LSB bias. With
// GAIN_LOG2 at or below the fraction width the word is shifted left instead.
// The factor 1/1024 and the 18-bit output width follow the design
// description; the scale the factor is applied in (ROM address steps) and
// the rounding are this design's choices.
//
// Interface: ve (signed 12 bit) -> vd (signed 18 bit). Combinational.
module loop_gain
  import fm_pkg::*;
#(
  parameter int unsigned GAIN = GAIN_LOG2  // gain is 2^-GAIN address steps
) (
  input  lf_t   ve,
  output freq_t vd
);

  localparam int FRAC  = int'(ACC_W) - int'(ADDR_W);
  localparam int SHIFT = int'(GAIN) - FRAC;

  freq_t ve_ext;
  assign ve_ext = ACC_W'(ve);

  if (SHIFT > 0) begin : g_right
    localparam freq_t HALF = freq_t'(1) <<< (SHIFT - 1);
    assign vd = (ve_ext + HALF) >>> SHIFT;
  end else begin : g_left
    assign vd = ve_ext <<< (-SHIFT);
  end

endmodule
