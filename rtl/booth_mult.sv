// booth_mult: combinational signed multiplier using radix-4 Booth recoding.
//
// The multiplier b is scanned in overlapping 3-bit groups {b[2i+1], b[2i],
// b[2i-1]} (b[-1] = 0). Each group selects a partial product of 0, +-a or
// +-2a, shifted left by 2i bits, and the W/2 partial products are summed in
// 2W bits. Both operands are two's complement; the product is exact.
// The phase detector of the receiver multiplies with Booth's algorithm; the
// radix (4) and the purely combinational form are this design's choice.
//
// Interface: a, b (W bits, signed) -> p (2W bits, signed). No clock; W must
// be even.
module booth_mult #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0]   a,
  input  logic signed [W-1:0]   b,
  output logic signed [2*W-1:0] p
);

  localparam int unsigned NGRP = W / 2;

  logic [W:0] b_ext;  // b with the implicit 0 below its LSB
  assign b_ext = {b, 1'b0};

  always_comb begin
    logic signed [2*W-1:0] a_ext;
    logic signed [2*W-1:0] pp;
    logic signed [2*W-1:0] acc;
    a_ext = (2*W)'(a);
    acc   = '0;
    for (int unsigned i = 0; i < NGRP; i++) begin
      unique case (b_ext[2*i +: 3])
        3'b000, 3'b111: pp = '0;
        3'b001, 3'b010: pp = a_ext;
        3'b011:         pp = a_ext <<< 1;
        3'b100:         pp = -(a_ext <<< 1);
        3'b101, 3'b110: pp = -a_ext;
        default:        pp = '0;
      endcase
      acc = acc + (pp <<< (2 * i));
    end
    p = acc;
  end

endmodule
