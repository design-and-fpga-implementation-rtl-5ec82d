// fm_receiver: DPLL-based digital FM demodulator (top level).
//
// The FM signal arrives as 8-bit samples from an ADC, one per clock. The
// digital PLL locks its NCO to the carrier; its loop filter output Ve(n)
// (12 bit) tracks the instantaneous frequency offset of the input and so is
// the demodulated signal. A 16-tap moving-average FIR smooths it into the
// 12-bit digital output dmout, whose top 8 bits (fm_out) feed the DAC.
// The ADC and DAC are outside this RTL: fm_in and fm_out are their ports.
// The chain ADC -> phase detector -> loop filter -> FIR -> DAC, the gain and
// NCO feedback, and the pins clock, reset, f_min (8 bit), address (10 bit),
// dmout (12 bit) and an 8-bit demodulated output follow the design
// description; taking fm_out as dmout's top 8 bits is this design's choice.
//
// Interface: clk, rst (synchronous, active high), fm_in (signed 8 bit) ->
// dmout (signed 12 bit), fm_out (signed 8 bit), address (10 bit, NCO
// cosine address), ve (signed 12 bit, unfiltered loop output),
// nco_out (signed 8 bit). dmout lags ve by one clock plus the FIR's group
// delay of 7.5 samples.
module fm_receiver
  import fm_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  sample_t           fm_in,
  output lf_t               dmout,
  output sample_t           fm_out,
  output logic [ADDR_W-1:0] address,
  output lf_t               ve,
  output sample_t           nco_out
);

  dpll u_dpll (
    .clk     (clk),
    .rst     (rst),
    .fm_in   (fm_in),
    .ve      (ve),
    .nco_out (nco_out),
    .address (address)
  );

  fir_filter u_fir (
    .clk  (clk),
    .rst  (rst),
    .din  (ve),
    .dout (dmout)
  );

  assign fm_out = dmout[LF_W-1 -: SAMPLE_W];

endmodule
