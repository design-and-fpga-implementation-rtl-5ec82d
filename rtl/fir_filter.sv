// fir_filter: 16-tap moving-average FIR, the output low-pass of the receiver.
//
// All 16 coefficients are 1/16, so the filter is the mean of the last 16
// samples: y[n] = (x[n] + x[n-1] + ... + x[n-15]) / 16. It is built in the
// transposed form: the 12-bit input is broadcast to every adder, and a chain
// of 15 registers carries the partial sums, s1[n] = x[n-1], s_k[n] =
// s_{k-1}[n-1] + x[n-1]. The last adder completes the 16-term sum (16 bit,
// enough for 16 x 12-bit samples) and the divide by 16 is an arithmetic shift
// right by 4, leaving a 12-bit result.
// Tap count, coefficient, shift, the transposed structure and the 12/16-bit
// widths follow the design description; signed samples, the registered
// output and the synchronous reset are this design's choices.
//
// Interface: clk, rst (synchronous, active high), din (signed 12 bit) ->
// dout (signed 12 bit). dout after the clock edge that samples x[n] is the
// mean of x[n] .. x[n-15], i.e. one clock of latency.
module fir_filter
  import fm_pkg::*;
#(
  parameter int unsigned TAPS  = FIR_TAPS,
  parameter int unsigned SUM_W = FIR_SUM_W
) (
  input  logic clk,
  input  logic rst,
  input  lf_t  din,
  output lf_t  dout
);

  localparam int unsigned SHIFT = $clog2(TAPS);

  logic signed [SUM_W-1:0] x_ext;
  logic [TAPS-2:0][SUM_W-1:0] part;  // partial-sum registers
  logic signed [SUM_W-1:0] sum;

  assign x_ext = SUM_W'(din);

  always_ff @(posedge clk) begin
    if (rst) part[0] <= '0;
    else     part[0] <= x_ext;
  end

  for (genvar k = 1; k < TAPS - 1; k++) begin : g_stage
    always_ff @(posedge clk) begin
      if (rst) part[k] <= '0;
      else     part[k] <= $signed(part[k-1]) + x_ext;
    end
  end

  assign sum = $signed(part[TAPS-2]) + x_ext;

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else     dout <= LF_W'(sum >>> SHIFT);
  end

endmodule
