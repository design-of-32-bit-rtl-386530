// pp_decoder: instruction decoder of the processor core.
//
// Purely combinational. From the instruction held in the instruction
// register it produces:
//  * the enable gating signals ADDEN, SHEN and MULEN. At most one is high, so
//    only the unit that the instruction needs sees real operands; the others
//    see zeros (data gating) and run from the reduced supply (each enable
//    also drives the PMCNT input of that unit's power switch);
//  * the result-bus selects ADDOP, SHOP and MULOP, which pick the unit whose
//    output is written back;
//  * register addresses, write enable, write-back source and the adder and
//    shifter modes (ctrl_o);
//  * RFSel<3:0> and PUSel<3:0>, the instruction's select fields, for the
//    array the core sits in.
// PUIN must be high for any function unit to be enabled or for a unit result
// to be written; RFIN must be high for any register write (unit result or
// load). The signal names follow the published block diagram; the encoding
// and the meaning given to RFIN/PUIN/RFSel/PUSel are this design's choice.
module pp_decoder
  import pp_pkg::*;
(
  input  logic [31:0] ir_i,
  input  logic        rfin,
  input  logic        puin,
  output logic        adden,
  output logic        shen,
  output logic        mulen,
  output logic        addop,
  output logic        shop,
  output logic        mulop,
  output logic [3:0]  rfsel,
  output logic [3:0]  pusel,
  output ctrl_t       ctrl_o
);

  instr_t ir;
  assign ir = instr_t'(ir_i);

  logic is_add, is_sh, is_mul;

  always_comb begin
    is_add = 1'b0;
    is_sh  = 1'b0;
    is_mul = 1'b0;
    ctrl_o = '0;
    ctrl_o.rd     = ir.rd;
    ctrl_o.rs1    = ir.rs1;
    ctrl_o.rs2    = ir.rs2;
    ctrl_o.wb_sel = WB_BUS;
    unique case (ir.op)
      OP_ADD: is_add = 1'b1;
      OP_SUB: begin is_add = 1'b1; ctrl_o.sub = 1'b1; end
      OP_SHL: begin is_sh = 1'b1; ctrl_o.sh_mode = SH_LL; end
      OP_SHR: begin is_sh = 1'b1; ctrl_o.sh_mode = SH_RL; end
      OP_SRA: begin is_sh = 1'b1; ctrl_o.sh_mode = SH_RA; end
      OP_MUL: is_mul = 1'b1;
      OP_LD:  begin ctrl_o.ld = 1'b1; ctrl_o.wb_sel = WB_DIN; end
      OP_ST:  ctrl_o.st = 1'b1;
      default: ;  // OP_NOP and unused codes do nothing
    endcase
    ctrl_o.rf_we = rfin & (((is_add | is_sh | is_mul) & puin) | (ir.op == OP_LD));
  end

  assign adden = is_add & puin;
  assign shen  = is_sh  & puin;
  assign mulen = is_mul & puin;

  // The result-bus selects follow the enables: the enabled unit drives the bus.
  assign addop = adden;
  assign shop  = shen;
  assign mulop = mulen;

  assign rfsel = ir.rfsel;
  assign pusel = ir.pusel;

  // Only one function unit may be selected at a time.
  always_comb assert ($onehot0({adden, shen, mulen}));

endmodule
