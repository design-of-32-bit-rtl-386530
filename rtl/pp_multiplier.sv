// pp_multiplier: 16x16-bit multiplier function unit with data gating.
//
// Multiplies the two unsigned 16-bit operands (the low halves of the register
// operands) into a 32-bit product. When the enable gating signal MULEN (en)
// is low both operands are forced to zero, so the multiplier does not switch
// and its output is zero. Combinational. The 16-bit operand width and the
// gating follow the published design; unsigned operands are this design's
// choice.
module pp_multiplier #(
  parameter int unsigned MUL_W = pp_pkg::MUL_W
) (
  input  logic               en,
  input  logic [MUL_W-1:0]   a,
  input  logic [MUL_W-1:0]   b,
  output logic [2*MUL_W-1:0] y
);

  logic [MUL_W-1:0] a_g, b_g;

  assign a_g = en ? a : '0;
  assign b_g = en ? b : '0;
  assign y   = (2*MUL_W)'(a_g) * (2*MUL_W)'(b_g);

endmodule
