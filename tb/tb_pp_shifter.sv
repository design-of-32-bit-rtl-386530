// tb_pp_shifter: self-checking test of the gated 32-bit shifter.
// Every shift amount 0..15 in every mode on random data, compared with a
// bit-by-bit reference built in the testbench; zero output while disabled.
module tb_pp_shifter;
  import pp_pkg::*;
  int checks = 0, failures = 0;
  logic        en;
  shmode_e     mode;
  logic [31:0] a, y, exp_y;
  logic [3:0]  shamt;

  pp_shifter dut (.en, .mode, .a, .shamt, .y);

  function automatic logic [31:0] ref_shift(logic [31:0] v, int s, shmode_e m);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) begin
      case (m)
        SH_LL:   r[i] = (i - s >= 0) ? v[i - s] : 1'b0;
        SH_RL:   r[i] = (i + s < 32) ? v[i + s] : 1'b0;
        SH_RA:   r[i] = (i + s < 32) ? v[i + s] : v[31];
        default: r[i] = 1'b0;
      endcase
    end
    return r;
  endfunction

  task automatic check();
    #1;
    exp_y = en ? ref_shift(a, int'(shamt), mode) : 32'd0;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL en=%0b mode=%s a=%h s=%0d y=%h exp=%h", en, mode.name(), a, shamt, y, exp_y);
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
    for (int m = 0; m < 3; m++)
      for (int s = 0; s < 16; s++)
        for (int k = 0; k < 4; k++) begin
          en = 1; mode = shmode_e'(m); shamt = 4'(s);
          a = (k == 0) ? 32'h8000_0001 : $urandom;
          check();
        end
    for (int i = 0; i < 100; i++) begin
      en = $urandom_range(1); mode = shmode_e'($urandom_range(2));
      shamt = 4'($urandom); a = $urandom;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
