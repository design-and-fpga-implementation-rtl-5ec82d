// phase_detector: multiplier phase detector of the digital PLL.
//
// Multiplies the 8-bit FM input sample (input 1) by the 8-bit NCO output
// (input 2) with a Booth multiplier. For v_i = sin(w n + th_i) and
// v_o = cos(w n + th_o) the product holds a sum-frequency term and a term
// proportional to sin(th_i - th_o), which the loop filter keeps. The 16-bit
// product is scaled to 8 bits by keeping its most significant byte
// (product[15:8], i.e. an arithmetic divide by 256), as the loop filter
// takes an 8-bit input. The product's low byte is deliberately dropped, so a
// lint tool reports those bits as unused.
// Multiplier, widths and MSB cropping follow the design description; signed
// (two's complement) samples and the single output register are this
// design's choices.
//
// Interface: clk, rst (synchronous, active high), in1 and in2 (signed 8 bit)
// -> pd_out (signed 8 bit), registered: valid one clock after the inputs.
module phase_detector
  import fm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t in1,     // FM input sample (f_min through the ADC)
  input  sample_t in2,     // NCO output
  output sample_t pd_out   // cropped product, to the loop filter
);

  logic signed [PROD_W-1:0] product;

  booth_mult #(.W(SAMPLE_W)) u_mult (
    .a (in1),
    .b (in2),
    .p (product)
  );

  always_ff @(posedge clk) begin
    if (rst) pd_out <= '0;
    else     pd_out <= product[PROD_W-1 -: SAMPLE_W];
  end

endmodule
