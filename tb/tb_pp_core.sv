// tb_pp_core: end-to-end self-checking test of the processor core at its
// default sizes.
//
// Runs a generated program through the core: loads fill the registers, then
// a sequence in the order of the published power waveform (a run of adds,
// then multiplies, then shifts, then adds again), then a random mix with
// stores, NOPs and cycles where RFIN or PUIN is low, and finally a store of
// every register. A reference model in the testbench (its own arithmetic
// and a shadow register file) predicts every register write and every value
// the core drives on D<31:0>. Every cycle it also checks:
//  * at most one function unit is enabled, and it is the one the
//    instruction needs;
//  * data gating: the operands seen inside every unselected unit are zero;
//  * voltage scaling: the selected unit's supply is VDD and every other
//    unit's is VDDL;
//  * one instruction completes per cycle (each result is in the register
//    file one edge after the instruction is captured).
// Each mechanism is counted, and one that never happened counts a failure.
module tb_pp_core;
  import pp_pkg::*;

  localparam real VDD  = 1.2;
  localparam real VDDL = 0.8;
  localparam int  NMIX = 400;

  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic [31:0] instr_i = 0, d_i = 0, d_o;
  logic        d_oe, rfin = 1, puin = 1;
  logic [3:0]  rfsel, pusel;
  logic        adden, shen, mulen;
  real         vdd = VDD, vddl = VDDL;
  real         adder_pvdd, shifter_pvdd, mul_pvdd;

  pp_core dut (.clk, .rst_n, .instr_i, .d_i, .d_o, .d_oe, .rfin, .puin, .rfsel, .pusel,
               .adden, .shen, .mulen, .vdd, .vddl, .adder_pvdd, .shifter_pvdd, .mul_pvdd);

  always #5 clk = ~clk;  // 100 MHz

  // Program: instruction, and for the cycle it executes: load data, RFIN, PUIN.
  typedef struct {
    logic [31:0] ins;
    logic [31:0] data;
    logic        rfin;
    logic        puin;
  } step_t;
  step_t prog[$];

  logic [31:0] shadow [16];

  // Mechanism counters.
  int n_add, n_sub, n_shl, n_shr, n_sra, n_mul, n_ld, n_st, n_nop;
  int n_rfin_block, n_puin_block, n_gated_idle;
  int n_up_add, n_up_sh, n_up_mul, n_down_add, n_down_sh, n_down_mul;
  int n_writes, n_cycles;

  task automatic fail(string msg);
    failures++;
    $display("FAIL t=%0t %s", $time, msg);
  endtask

  function automatic void add_step(opcode_e op, int rd, int rs1, int rs2,
                                   logic [31:0] data = 0, logic rf = 1, logic pu = 1);
    step_t s;
    s.ins = mk_instr(op, 4'(rd), 4'(rs1), 4'(rs2), 4'($urandom), 4'($urandom));
    s.data = data; s.rfin = rf; s.puin = pu;
    prog.push_back(s);
  endfunction

  function automatic int rr();
    return $urandom_range(15);
  endfunction

  // Reference: the value an instruction writes, computed independently.
  function automatic logic [31:0] ref_result(instr_t i, logic [31:0] data);
    logic [31:0] a, b;
    logic [63:0] w;
    a = shadow[i.rs1]; b = shadow[i.rs2];
    case (i.op)
      OP_ADD: return 32'(64'(a) + 64'(b));
      OP_SUB: return 32'(64'(a) - 64'(b));
      OP_SHL: return a << b[3:0];
      OP_SHR: return a >> b[3:0];
      OP_SRA: begin w = {{32{a[31]}}, a}; return 32'(w >> b[3:0]); end
      OP_MUL: return 32'(64'(a[15:0]) * 64'(b[15:0]));
      OP_LD:  return data;
      default: return 32'd0;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opcode_e ops[9];
    ops = '{OP_NOP, OP_ADD, OP_SUB, OP_SHL, OP_SHR, OP_SRA, OP_MUL, OP_LD, OP_ST};
    // Fill the registers.
    for (int r = 0; r < 16; r++) add_step(OP_LD, r, 0, 0, $urandom);
    // Sequence in the order of the published waveform.
    for (int k = 0; k < 10; k++) add_step(k % 3 == 2 ? OP_SUB : OP_ADD, rr(), rr(), rr());
    for (int k = 0; k < 4; k++)  add_step(OP_MUL, rr(), rr(), rr());
    for (int k = 0; k < 12; k++) add_step(k % 3 == 0 ? OP_SHL : k % 3 == 1 ? OP_SHR : OP_SRA, rr(), rr(), rr());
    for (int k = 0; k < 3; k++)  add_step(OP_ADD, rr(), rr(), rr());
    // Random mix.
    for (int k = 0; k < NMIX; k++)
      add_step(ops[$urandom_range(8)], rr(), rr(), rr(), $urandom,
               $urandom_range(9) != 0, $urandom_range(9) != 0);
    // Store every register.
    for (int r = 0; r < 16; r++) add_step(OP_ST, 0, r, 0);
    add_step(OP_NOP, 0, 0, 0);
    add_step(OP_NOP, 0, 0, 0);
  end

  // Drive: at each falling edge present the next instruction, and the load
  // data, RFIN and PUIN belonging to the instruction now in the register.
  int          pc = 0;
  step_t       cur, nxt;
  logic        have_cur = 0;
  logic        exp_oe = 0;
  logic [31:0] exp_do = 0;

  initial begin
    for (int r = 0; r < 16; r++) shadow[r] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (pc <= prog.size()) begin
      // --- falling edge: set inputs ---
      if (pc < prog.size()) instr_i = prog[pc].ins; else instr_i = 32'd0;
      if (have_cur) begin d_i = cur.data; rfin = cur.rfin; puin = cur.puin; end
      else begin d_i = $urandom; rfin = 1; puin = 1; end
      #1;
      if (have_cur) check_execute(cur);
      // --- rising edge: the current instruction completes ---
      @(posedge clk);
      n_cycles++;
      if (have_cur) retire(cur);
      #1;
      checks++;
      if (d_oe !== exp_oe || (exp_oe && d_o !== exp_do))
        fail($sformatf("D bus: d_oe=%0b d_o=%h expected %0b %h", d_oe, d_o, exp_oe, exp_do));
      for (int r = 0; r < 16; r++) begin
        checks++;
        if (dut.u_rf.regs[r] !== shadow[r])
          fail($sformatf("r%0d=%h expected %h", r, dut.u_rf.regs[r], shadow[r]));
      end
      if (pc < prog.size()) begin cur = prog[pc]; have_cur = 1; end else have_cur = 0;
      pc++;
      @(negedge clk);
    end
    report();
  end

  task automatic check_execute(step_t s);
    instr_t i;
    logic e_add, e_sh, e_mul;
    i = instr_t'(s.ins);
    e_add = s.puin && (i.op == OP_ADD || i.op == OP_SUB);
    e_sh  = s.puin && (i.op == OP_SHL || i.op == OP_SHR || i.op == OP_SRA);
    e_mul = s.puin && (i.op == OP_MUL);
    checks += 3;
    if (adden !== e_add || shen !== e_sh || mulen !== e_mul)
      fail($sformatf("enables %b%b%b expected %b%b%b", adden, shen, mulen, e_add, e_sh, e_mul));
    if (rfsel !== i.rfsel || pusel !== i.pusel) fail("RFSel/PUSel");
    // Data gating: unselected units see zero operands.
    if (!e_add && (dut.u_add.a_g !== 0 || dut.u_add.b_g !== 0)) fail("adder inputs not gated");
    if (!e_sh  && (dut.u_sh.a_g  !== 0 || dut.u_sh.s_g  !== 0)) fail("shifter inputs not gated");
    if (!e_mul && (dut.u_mul.a_g !== 0 || dut.u_mul.b_g !== 0)) fail("multiplier inputs not gated");
    if (!e_add && !e_sh && !e_mul) n_gated_idle++;
    // Voltage scaling.
    checks += 3;
    if (adder_pvdd   != (e_add ? VDD : VDDL)) fail($sformatf("adder supply %f", adder_pvdd));
    if (shifter_pvdd != (e_sh  ? VDD : VDDL)) fail($sformatf("shifter supply %f", shifter_pvdd));
    if (mul_pvdd     != (e_mul ? VDD : VDDL)) fail($sformatf("multiplier supply %f", mul_pvdd));
  endtask

  real last_add = VDDL, last_sh = VDDL, last_mul = VDDL;
  always @(negedge clk) if (rst_n) begin
    #2;
    if (last_add != adder_pvdd)   begin if (adder_pvdd == VDD) n_up_add++; else n_down_add++; end
    if (last_sh  != shifter_pvdd) begin if (shifter_pvdd == VDD) n_up_sh++; else n_down_sh++; end
    if (last_mul != mul_pvdd)     begin if (mul_pvdd == VDD) n_up_mul++; else n_down_mul++; end
    last_add = adder_pvdd; last_sh = shifter_pvdd; last_mul = mul_pvdd;
  end

  task automatic retire(step_t s);
    instr_t i;
    logic fu, we;
    i = instr_t'(s.ins);
    fu = (i.op inside {OP_ADD, OP_SUB, OP_SHL, OP_SHR, OP_SRA, OP_MUL});
    we = s.rfin && ((fu && s.puin) || i.op == OP_LD);
    exp_oe = (i.op == OP_ST);
    if (exp_oe) exp_do = shadow[i.rs1];
    case (i.op)
      OP_ADD: n_add++;
      OP_SUB: n_sub++;
      OP_SHL: n_shl++;
      OP_SHR: n_shr++;
      OP_SRA: n_sra++;
      OP_MUL: n_mul++;
      OP_LD:  n_ld++;
      OP_ST:  n_st++;
      default: n_nop++;
    endcase
    if ((fu || i.op == OP_LD) && !s.rfin) n_rfin_block++;
    if (fu && s.rfin && !s.puin) n_puin_block++;
    if (we) begin
      shadow[i.rd] = ref_result(i, s.data);
      n_writes++;
    end
  endtask

  task automatic need(int n, string what);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) fail($sformatf("mechanism never exercised: %s", what));
  endtask

  task automatic report();
    int issued;
    $display("mechanisms exercised:");
    need(n_add, "ADD");
    need(n_sub, "SUB");
    need(n_shl, "SHL");
    need(n_shr, "SHR");
    need(n_sra, "SRA");
    need(n_mul, "MUL");
    need(n_ld, "load (D -> DIN -> register)");
    need(n_st, "store (register -> DOUT -> D)");
    need(n_nop, "NOP");
    need(n_gated_idle, "cycles with every unit gated");
    need(n_rfin_block, "write blocked by RFIN low");
    need(n_puin_block, "unit blocked by PUIN low");
    need(n_up_add, "adder VDDL -> VDD");
    need(n_down_add, "adder VDD -> VDDL");
    need(n_up_sh, "shifter VDDL -> VDD");
    need(n_down_sh, "shifter VDD -> VDDL");
    need(n_up_mul, "multiplier VDDL -> VDD");
    need(n_down_mul, "multiplier VDD -> VDDL");
    // Throughput: every program step issued and retired in one cycle each.
    issued = prog.size();
    checks++;
    $display("  %0d instructions in %0d cycles after reset (%0d register writes)", issued, n_cycles - 1, n_writes);
    if (n_cycles - 1 != issued) fail("throughput is not one instruction per cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
endmodule
