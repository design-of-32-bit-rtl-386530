// tb_pp_wave_program: runs the kind of test program behind the published
// supply waveform of the core and reports how long each function unit spends
// on each supply.
//
// Program order follows that waveform: a run of adds, then multiplies, then
// shifts, then adds again. The lengths of the runs (10, 4, 12, 4
// instructions), the gap of NOPs around them and the operand values are this
// testbench's choice, as the published waveform gives no cycle numbers. At
// 100 MHz one instruction per cycle gives the 100 MIPS of the published
// results. Checked:
//  * each unit's supply is VDD exactly in the cycles its instructions
//    execute and VDDL otherwise, so the per-unit residency counts equal the
//    run lengths;
//  * every result, read back over D<31:0> with stores, against values
//    computed here;
//  * the whole program retires in exactly as many cycles as it has
//    instructions.
module tb_pp_wave_program;
  import pp_pkg::*;

  localparam real VDD  = 1.2;
  localparam real VDDL = 0.8;
  localparam int  N_ADD1 = 10, N_MUL = 4, N_SH = 12, N_ADD2 = 4;

  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [31:0] instr_i = 0, d_i = 0, d_o;
  logic        d_oe;
  logic [3:0]  rfsel, pusel;
  logic        adden, shen, mulen;
  real         vdd = VDD, vddl = VDDL;
  real         adder_pvdd, shifter_pvdd, mul_pvdd;

  pp_core dut (.clk, .rst_n, .instr_i, .d_i, .d_o, .d_oe, .rfin(1'b1), .puin(1'b1),
               .rfsel, .pusel, .adden, .shen, .mulen, .vdd, .vddl,
               .adder_pvdd, .shifter_pvdd, .mul_pvdd);

  always #5 clk = ~clk;

  logic [31:0] prog[$];
  logic [31:0] ldata[$];    // load data, by program index
  logic [31:0] expected[$]; // values the final stores must drive
  logic [31:0] r [16];
  int add_hi, add_lo, mul_hi, mul_lo, sh_hi, sh_lo, cycles, stores_seen;

  function automatic void emit(logic [31:0] ins, logic [31:0] data = 0);
    prog.push_back(ins);
    ldata.push_back(data);
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Operands: r0..r7 loaded with fixed values.
    for (int i = 0; i < 8; i++) begin
      r[i] = 32'h0001_0003 * (i + 1) + (i << 28);
      emit(mk_instr(OP_LD, 4'(i), 0, 0), r[i]);
    end
    for (int i = 8; i < 16; i++) r[i] = 0;
    emit(mk_instr(OP_NOP, 0, 0, 0));
    for (int k = 0; k < N_ADD1; k++) begin
      emit(mk_instr(OP_ADD, 4'd8, 4'd8, 4'(k % 8)));
      r[8] = r[8] + r[k % 8];
    end
    for (int k = 0; k < N_MUL; k++) begin
      emit(mk_instr(OP_MUL, 4'(9 + k), 4'(k), 4'(k + 1)));
      r[9 + k] = {16'd0, r[k][15:0]} * {16'd0, r[k + 1][15:0]};
    end
    for (int k = 0; k < N_SH; k++) begin
      opcode_e op;
      int src;
      op = (k % 3 == 0) ? OP_SHL : (k % 3 == 1) ? OP_SHR : OP_SRA;
      src = k % 8;
      emit(mk_instr(op, 4'd13, 4'(src), 4'(k % 8)));
      case (op)
        OP_SHL:  r[13] = r[src] << r[k % 8][3:0];
        OP_SHR:  r[13] = r[src] >> r[k % 8][3:0];
        default: r[13] = 32'($signed(r[src]) >>> r[k % 8][3:0]);
      endcase
    end
    for (int k = 0; k < N_ADD2; k++) begin
      emit(mk_instr(OP_SUB, 4'd15, 4'd8, 4'(9 + k)));
      r[15] = r[8] - r[9 + k];
    end
    emit(mk_instr(OP_NOP, 0, 0, 0));
    // Read results back.
    for (int i = 8; i < 16; i++) begin
      emit(mk_instr(OP_ST, 0, 4'(i), 0));
      expected.push_back(r[i]);
    end
    emit(mk_instr(OP_NOP, 0, 0, 0));
    emit(mk_instr(OP_NOP, 0, 0, 0));
  end

  initial begin
    int k;
    k = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int pc = 0; pc <= prog.size(); pc++) begin
      instr_i = (pc < prog.size()) ? prog[pc] : 32'd0;
      d_i = (pc > 0) ? ldata[pc - 1] : 32'd0;
      #1;
      if (pc > 0) begin
        instr_t i;
        logic e_add, e_sh, e_mul;
        i = instr_t'(prog[pc - 1]);
        e_add = i.op inside {OP_ADD, OP_SUB};
        e_sh  = i.op inside {OP_SHL, OP_SHR, OP_SRA};
        e_mul = i.op == OP_MUL;
        checks += 3;
        if (adder_pvdd   != (e_add ? VDD : VDDL)) begin failures++; $display("FAIL adder supply at %0d", pc); end
        if (shifter_pvdd != (e_sh  ? VDD : VDDL)) begin failures++; $display("FAIL shifter supply at %0d", pc); end
        if (mul_pvdd     != (e_mul ? VDD : VDDL)) begin failures++; $display("FAIL mul supply at %0d", pc); end
        if (adder_pvdd == VDD) add_hi++; else add_lo++;
        if (shifter_pvdd == VDD) sh_hi++; else sh_lo++;
        if (mul_pvdd == VDD) mul_hi++; else mul_lo++;
      end
      @(posedge clk);
      cycles++;
      #1;
      if (d_oe) begin
        checks++;
        if (k >= expected.size() || d_o !== expected[k]) begin
          failures++;
          $display("FAIL store %0d: %h expected %h", k, d_o, (k < expected.size()) ? expected[k] : 0);
        end
        k++;
      end
      @(negedge clk);
    end
    stores_seen = k;
    checks += 5;
    if (stores_seen != expected.size()) begin failures++; $display("FAIL %0d stores seen", stores_seen); end
    if (add_hi != N_ADD1 + N_ADD2) begin failures++; $display("FAIL adder at VDD %0d cycles", add_hi); end
    if (mul_hi != N_MUL) begin failures++; $display("FAIL multiplier at VDD %0d cycles", mul_hi); end
    if (sh_hi != N_SH) begin failures++; $display("FAIL shifter at VDD %0d cycles", sh_hi); end
    if (cycles != prog.size() + 1) begin failures++; $display("FAIL %0d cycles for %0d instructions", cycles, prog.size()); end
    $display("%0d instructions, %0d cycles (one per cycle: 100 MIPS at 100 MHz)", prog.size(), cycles - 1);
    $display("cycles at VDD / VDDL: adder %0d/%0d  multiplier %0d/%0d  shifter %0d/%0d",
             add_hi, add_lo, mul_hi, mul_lo, sh_hi, sh_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
