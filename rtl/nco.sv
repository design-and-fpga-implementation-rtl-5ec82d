// nco: numerically controlled oscillator (direct digital synthesiser).
//
// An 18-bit modulo phase accumulator adds, every clock, the free-running
// offset (1/16 of a cycle, 2^18 / 16 = 16384) plus the signed frequency
// correction vd from the loop gain. Its top 10 bits are the cosine address
// (1024 points per cycle). Address check splits the address into a quadrant
// (bits 9:8) and an 8-bit table index; in the 2nd and 4th quadrant the index
// is mirrored (255 - index, giving rom[511-i] and rom[1023-i]). The quadrant
// complementer negates the table value in the 2nd and 3rd quadrant, and a
// 4:1 choice by quadrant gives the 8-bit signed output:
//   Q1  0..255   : +rom[i]        Q2  256..511  : -rom[511-i]
//   Q3  512..767 : -rom[i-512]    Q4  768..1023 : +rom[1023-i]
// With vd = 0 the output is a cosine of 1/16 of the clock frequency
// (1 MHz at a 16 MHz clock, 16 samples per cycle).
// Accumulator width, address width, offset, table size and quadrant mapping
// follow the design description; the pipeline (accumulator register, table
// read register, output register) and reset to phase 0 are this design's
// choices.
//
// Interface: clk, rst (synchronous, active high), vd (signed 18 bit) ->
// dout (signed 8 bit), address (10 bit). address is the accumulator's top
// bits; dout is the cosine of an address two clocks later. vd enters the
// accumulator on the clock edge where it is presented.
module nco
  import fm_pkg::*;
#(
  parameter int unsigned OFFSET = 2**ACC_W / 16  // free-running phase step
) (
  input  logic               clk,
  input  logic               rst,
  input  freq_t              vd,
  output sample_t            dout,
  output logic [ADDR_W-1:0]  address
);

  logic [ACC_W-1:0] phase_acc;
  quadrant_e        quad, quad_q;
  logic [LUT_W-1:0] idx, lut_addr;
  logic [SAMPLE_W-1:0] rom_q;

  // Modulo accumulator: wraps at 2^18.
  always_ff @(posedge clk) begin
    if (rst) phase_acc <= '0;
    else     phase_acc <= phase_acc + ACC_W'(OFFSET) + ACC_W'(vd);
  end

  assign address = phase_acc[ACC_W-1 -: ADDR_W];

  // Address check: quadrant and (mirrored) table index.
  always_comb begin
    quad = quadrant_e'(address[ADDR_W-1 -: 2]);
    idx  = address[LUT_W-1:0];
    lut_addr = (quad == Q2 || quad == Q4) ? ~idx : idx;
  end

  cos_rom u_rom (
    .clk  (clk),
    .addr (lut_addr),
    .data (rom_q)
  );

  always_ff @(posedge clk) begin
    if (rst) quad_q <= Q1;
    else     quad_q <= quad;
  end

  // Quadrant complementer and 4:1 output selection.
  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else begin
      unique case (quad_q)
        Q1, Q4: dout <= sample_t'(rom_q);
        Q2, Q3: dout <= -sample_t'(rom_q);
        default: dout <= '0;
      endcase
    end
  end

endmodule
