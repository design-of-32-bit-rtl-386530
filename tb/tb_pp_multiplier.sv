// tb_pp_multiplier: self-checking test of the gated 16x16 multiplier.
// Corner and random operands against a shift-and-add product computed in the
// testbench; zero output while disabled.
module tb_pp_multiplier;
  int checks = 0, failures = 0;
  logic        en;
  logic [15:0] a, b;
  logic [31:0] y, exp_y;

  pp_multiplier dut (.en, .a, .b, .y);

  function automatic logic [31:0] ref_mul(logic [15:0] x, logic [15:0] z);
    logic [31:0] acc = 0;
    for (int i = 0; i < 16; i++) if (z[i]) acc += {16'd0, x} << i;
    return acc;
  endfunction

  task automatic check();
    #1;
    exp_y = en ? ref_mul(a, b) : 32'd0;
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL en=%0b a=%h b=%h y=%h exp=%h", en, a, b, y, exp_y);
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
    en = 1; a = 16'hFFFF; b = 16'hFFFF; check();
    a = 16'h8000; b = 16'h0002; check();
    a = 16'd0; b = 16'h1234; check();
    for (int i = 0; i < 500; i++) begin
      en = ($urandom_range(3) != 0); a = 16'($urandom); b = 16'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
