// tb_pp_decoder: self-checking test of the instruction decoder.
// For random instructions and RFIN/PUIN values, compares every output with
// an expected value derived from the opcode table written out here.
module tb_pp_decoder;
  import pp_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] ir_i;
  logic        rfin, puin;
  logic        adden, shen, mulen, addop, shop, mulop;
  logic [3:0]  rfsel, pusel;
  ctrl_t       ctrl;

  pp_decoder dut (.ir_i, .rfin, .puin, .adden, .shen, .mulen, .addop, .shop, .mulop,
                  .rfsel, .pusel, .ctrl_o(ctrl));

  task automatic expect1(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s ir=%h rfin=%0b puin=%0b got=%0b exp=%0b", what, ir_i, rfin, puin, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      logic [3:0] op;
      logic e_add, e_sh, e_mul, e_we;
      op = (i < 64) ? 4'(i % 16) : 4'($urandom);
      ir_i = {op, 28'($urandom)};
      rfin = (i < 64) ? 1'(i / 16) : 1'($urandom);
      puin = (i < 64) ? 1'(i / 32) : 1'($urandom);
      #1;
      e_add = puin && (op == 4'd1 || op == 4'd2);
      e_sh  = puin && (op >= 4'd3 && op <= 4'd5);
      e_mul = puin && (op == 4'd6);
      e_we  = rfin && (op == 4'd7 || (puin && op >= 4'd1 && op <= 4'd6));
      expect1(adden, e_add, "adden");
      expect1(shen, e_sh, "shen");
      expect1(mulen, e_mul, "mulen");
      expect1(addop, e_add, "addop");
      expect1(shop, e_sh, "shop");
      expect1(mulop, e_mul, "mulop");
      expect1(ctrl.rf_we, e_we, "rf_we");
      expect1(ctrl.ld, op == 4'd7, "ld");
      expect1(ctrl.st, op == 4'd8, "st");
      expect1(ctrl.wb_sel == WB_DIN, op == 4'd7, "wb_sel");
      if (e_add) expect1(ctrl.sub, op == 4'd2, "sub");
      if (op == 4'd3) expect1(ctrl.sh_mode == SH_LL, 1'b1, "shl mode");
      if (op == 4'd4) expect1(ctrl.sh_mode == SH_RL, 1'b1, "shr mode");
      if (op == 4'd5) expect1(ctrl.sh_mode == SH_RA, 1'b1, "sra mode");
      expect1(ctrl.rd == ir_i[27:24], 1'b1, "rd");
      expect1(ctrl.rs1 == ir_i[23:20], 1'b1, "rs1");
      expect1(ctrl.rs2 == ir_i[19:16], 1'b1, "rs2");
      expect1(rfsel == ir_i[15:12], 1'b1, "rfsel");
      expect1(pusel == ir_i[11:8], 1'b1, "pusel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
