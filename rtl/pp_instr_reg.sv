// pp_instr_reg: the core's 32-bit instruction register.
//
// Captures Instruction<31:0> on every rising clock edge and holds it for the
// decoder for one cycle, so one instruction is issued per clock. RB (rst_n,
// active low, asynchronous) clears it to the all-zero word, which is a NOP.
// The register, its clock and its reset input follow the published block
// diagram; the reset value and the absence of a load enable are this design's
// choice.
module pp_instr_reg #(
  parameter int unsigned XLEN = pp_pkg::XLEN
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [XLEN-1:0] instr_i,
  output logic [XLEN-1:0] ir_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ir_o <= '0;
    else        ir_o <= instr_i;
  end

endmodule
