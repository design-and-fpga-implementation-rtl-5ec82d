// cos_rom: 256 x 8 quarter-wave cosine table with a registered read port.
//
// Entry j holds round(127 * cos(2*pi*(j + 0.5) / 1024)), j = 0 .. 255: the
// first quarter of a 1024-point cosine cycle, sampled half a step off the
// grid so that the mirrored quarters (addresses 511-i and 1023-i) reproduce
// the cycle symmetrically. Values run from 127 down to 0, all positive; the
// NCO supplies the sign. The table is loaded from cos_rom.hex (256 lines of
// two hex digits) given by INIT_FILE, relative to the project root.
// The 256 x 8 size and the quarter-wave storage follow the design
// description; the amplitude 127, the half-step offset and the one-clock
// read are this design's choices.
//
// Interface: clk, addr (8 bit) -> data (8 bit), one clock after addr.
module cos_rom
  import fm_pkg::*;
#(
  parameter string INIT_FILE = "rtl/cos_rom.hex"
) (
  input  logic              clk,
  input  logic [LUT_W-1:0]  addr,
  output logic [SAMPLE_W-1:0] data
);

  logic [SAMPLE_W-1:0] rom [2**LUT_W];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(posedge clk) data <= rom[addr];

endmodule
