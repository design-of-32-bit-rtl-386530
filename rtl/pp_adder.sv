// pp_adder: 32-bit adder function unit with data gating.
//
// When the enable gating signal ADDEN (en) is low both operands and the
// subtract control are forced to zero before the adder, so its inputs do not
// switch and its output is zero: this is the data gating of the core, which
// leaves only the selected unit active. When en is high, y = a + b, or
// a - b (two's complement: b inverted, carry in of 1) when sub is high.
// Combinational. The 32-bit width and the gating follow the published design;
// the subtract option is this design's choice.
module pp_adder #(
  parameter int unsigned XLEN = pp_pkg::XLEN
) (
  input  logic            en,
  input  logic            sub,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic [XLEN-1:0] y
);

  logic [XLEN-1:0] a_g, b_g;
  logic            sub_g;

  assign a_g   = en ? a : '0;
  assign b_g   = en ? b : '0;
  assign sub_g = en & sub;

  assign y = a_g + (sub_g ? ~b_g : b_g) + XLEN'(sub_g);

endmodule
