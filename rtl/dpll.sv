// dpll: the digital phase-locked loop of the FM receiver.
//
// Closes the loop phase detector -> loop filter -> gain (1/1024) -> NCO ->
// phase detector. The phase detector multiplies the 8-bit FM input by the
// NCO cosine; the loop filter H(z) = 1/(z - 15/16) removes the sum-frequency
// term and leaves Ve(n), proportional to sin(phase error); the gain turns
// Ve(n) into the frequency correction Vd(n) that moves the NCO from its
// free-running 1/16 of the clock toward the input frequency. Once locked,
// Ve(n) follows the input's instantaneous frequency offset, so it is the
// demodulated FM signal.
// The loop and its widths follow the design description; see the blocks for
// their own choices.
//
// Interface: clk, rst (synchronous, active high), fm_in (signed 8 bit, one
// sample per clock) -> ve (signed 12 bit, loop filter output), nco_out
// (signed 8 bit), address (10 bit NCO cosine address). Latency round the
// loop: phase detector 1, loop filter 1, NCO accumulator 1, NCO output 2.
module dpll
  import fm_pkg::*;
#(
  parameter int unsigned OFFSET = 2**ACC_W / 16,
  parameter int unsigned GAIN   = GAIN_LOG2
) (
  input  logic              clk,
  input  logic              rst,
  input  sample_t           fm_in,
  output lf_t               ve,
  output sample_t           nco_out,
  output logic [ADDR_W-1:0] address
);

  sample_t pd_out;
  freq_t   vd;

  phase_detector u_pd (
    .clk    (clk),
    .rst    (rst),
    .in1    (fm_in),
    .in2    (nco_out),
    .pd_out (pd_out)
  );

  loop_filter u_lf (
    .clk (clk),
    .rst (rst),
    .a   (pd_out),
    .b   (ve)
  );

  loop_gain #(.GAIN(GAIN)) u_gain (
    .ve (ve),
    .vd (vd)
  );

  nco #(.OFFSET(OFFSET)) u_nco (
    .clk     (clk),
    .rst     (rst),
    .vd      (vd),
    .dout    (nco_out),
    .address (address)
  );

endmodule
