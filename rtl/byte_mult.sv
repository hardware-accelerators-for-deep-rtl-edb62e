// byte_mult: the 8x8-bit multiplier at the heart of the iterative MAC.
//
// It forms one partial product from one byte of each operand. A multi-byte
// two's-complement operand is split so that its most significant byte
// carries the sign and every lower byte is an unsigned digit, so each input
// byte comes with a flag saying which of the two it is. Both bytes are
// extended (sign or zero) and multiplied; the result always fits
// in 17 signed bits (-32640 .. 65025).
//
// Interface: a, b are the bytes, a_signed, b_signed their flags, p the
// product. Purely combinational, no clock.
//
// Reusing one small multiplier in time for wide products follows the
// serial scheme the design is built on; the per-byte sign flags are this
// design's way of handling signed operands.
module byte_mult
  import imac_pkg::*;
(
  input  logic [BYTE_W-1:0]      a,
  input  logic                   a_signed,
  input  logic [BYTE_W-1:0]      b,
  input  logic                   b_signed,
  output logic signed [PP_W-1:0] p
);

  // Both bytes extended to the product width; the true product fits in
  // PP_W signed bits, so the truncated product is exact.
  logic signed [PP_W-1:0] a_ext;
  logic signed [PP_W-1:0] b_ext;

  always_comb begin
    a_ext = {{(PP_W-BYTE_W){a_signed & a[BYTE_W-1]}}, a};
    b_ext = {{(PP_W-BYTE_W){b_signed & b[BYTE_W-1]}}, b};
    p     = a_ext * b_ext;
  end

endmodule
