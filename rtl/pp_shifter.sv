// pp_shifter: 32-bit shifter function unit with data gating.
//
// Shifts the 32-bit operand a by the 4-bit amount shamt (0 to 15 places):
// logical left, logical right or arithmetic right, chosen by mode. When the
// enable gating signal SHEN (en) is low the operand and shift amount are
// forced to zero, so the shifter does not switch and its output is zero.
// Combinational. The 32-bit width, the 4-bit shift amount and the gating
// follow the published design; the three shift kinds are this design's
// choice.
module pp_shifter
  import pp_pkg::shmode_e, pp_pkg::SH_LL, pp_pkg::SH_RL, pp_pkg::SH_RA;
#(
  parameter int unsigned XLEN    = pp_pkg::XLEN,
  parameter int unsigned SHAMT_W = pp_pkg::SHAMT_W
) (
  input  logic               en,
  input  shmode_e            mode,
  input  logic [XLEN-1:0]    a,
  input  logic [SHAMT_W-1:0] shamt,
  output logic [XLEN-1:0]    y
);

  logic [XLEN-1:0]    a_g;
  logic [SHAMT_W-1:0] s_g;

  assign a_g = en ? a : '0;
  assign s_g = en ? shamt : '0;

  always_comb begin
    unique case (mode)
      SH_LL:   y = a_g << s_g;
      SH_RL:   y = a_g >> s_g;
      SH_RA:   y = XLEN'($signed(a_g) >>> s_g);
      default: y = '0;
    endcase
  end

endmodule
