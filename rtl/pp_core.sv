// pp_core: 32-bit processor core with instruction-level data gating and
// instruction-level dual-supply voltage scaling.
//
// The core is meant as one element of a parallel (SIMD/MIMD) array. Its
// instruction register, decoder, register files and load/store unit run
// from the full supply; each of its three function units (32-bit adder,
// 32-bit shifter with a 4-bit shift amount, 16x16-bit multiplier) runs from
// its own DVSPS power switch. The decoder raises exactly one enable gating
// signal (ADDEN, SHEN or MULEN) for the unit the instruction needs. That
// enable does two things at once:
//  * data gating: the other units get all-zero operands, so they do not
//    switch;
//  * voltage scaling: it is the PMCNT input of the unit's DVSPS, which puts
//    the selected unit on VDD and leaves the others on VDDL.
// The supply level is thus chosen by the instruction itself, with no voltage
// scheduler or DC-DC converter. The selected unit's result goes back to the
// register files over the result bus (selects ADDOP, SHOP, MULOP).
//
// Timing: one clock. The instruction on instr_i is captured on a rising
// edge; during the following cycle it is decoded, its operands are read, the
// enabled unit computes, and the result (or the load data) is written on the
// next rising edge, the same edge that captures the next instruction. One
// instruction completes per cycle with no hazards, since a result is in the
// register file before the next instruction reads it. A store drives d_o
// with d_oe high during the cycle after it executes. The published design
// uses two clocks, CLK1 and CLK2; mapping them onto one edge is this
// design's choice, as are the instruction encoding (see pp_pkg), the
// register count and the split of D<31:0> into d_i/d_o/d_oe.
//
// Supplies: vdd and vddl are real rail voltages (1.2 V and 0.8 V in the
// published design); adder_pvdd, shifter_pvdd and mul_pvdd report each
// unit's present supply.
module pp_core
  import pp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,     // RB, active low
  input  logic [31:0] instr_i,   // Instruction<31:0>
  input  logic [31:0] d_i,       // D<31:0>, into the core
  output logic [31:0] d_o,       // D<31:0>, out of the core
  output logic        d_oe,      // the core drives D<31:0>
  input  logic        rfin,      // RFIN: register-file writes allowed
  input  logic        puin,      // PUIN: function units allowed
  output logic [3:0]  rfsel,     // RFSel<3:0>
  output logic [3:0]  pusel,     // PUSel<3:0>
  output logic        adden,
  output logic        shen,
  output logic        mulen,
  input  real         vdd,
  input  real         vddl,
  output real         adder_pvdd,
  output real         shifter_pvdd,
  output real         mul_pvdd
);

  logic [31:0]     ir;
  ctrl_t           ctrl;
  logic            addop, shop, mulop;
  logic [XLEN-1:0] rdata1, rdata2, dout, din;
  logic [XLEN-1:0] add_y, sh_y, mul_y, res_bus;

  pp_instr_reg u_ir (
    .clk, .rst_n, .instr_i, .ir_o(ir)
  );

  pp_decoder u_dec (
    .ir_i(ir), .rfin, .puin,
    .adden, .shen, .mulen, .addop, .shop, .mulop,
    .rfsel, .pusel, .ctrl_o(ctrl)
  );

  pp_regfile u_rf (
    .clk, .rst_n,
    .rs1(ctrl.rs1), .rs2(ctrl.rs2), .rdata1, .rdata2, .dout,
    .we(ctrl.rf_we), .rd(ctrl.rd), .wb_sel(ctrl.wb_sel),
    .res_bus, .din
  );

  pp_lsu u_lsu (
    .clk, .rst_n, .ld(ctrl.ld), .st(ctrl.st),
    .d_i, .d_o, .d_oe, .dout, .din
  );

  // Function units, each with its enable gating signal.
  pp_adder u_add (
    .en(adden), .sub(ctrl.sub), .a(rdata1), .b(rdata2), .y(add_y)
  );

  pp_shifter u_sh (
    .en(shen), .mode(ctrl.sh_mode), .a(rdata1), .shamt(rdata2[SHAMT_W-1:0]), .y(sh_y)
  );

  pp_multiplier u_mul (
    .en(mulen), .a(rdata1[MUL_W-1:0]), .b(rdata2[MUL_W-1:0]), .y(mul_y)
  );

  pp_result_bus u_bus (
    .addop, .shop, .mulop, .add_y, .sh_y, .mul_y, .bus(res_bus)
  );

  // One DVSPS per function unit; PMCNT is the unit's enable gating signal.
  pp_dvsps u_dvsps_add (.vdd, .vddl, .pmcnt(adden), .pout(adder_pvdd));
  pp_dvsps u_dvsps_sh  (.vdd, .vddl, .pmcnt(shen),  .pout(shifter_pvdd));
  pp_dvsps u_dvsps_mul (.vdd, .vddl, .pmcnt(mulen), .pout(mul_pvdd));

endmodule
