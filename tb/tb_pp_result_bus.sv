// tb_pp_result_bus: self-checking test of the write-back bus select.
// Each select alone must pass its unit's result; no select gives zero.
module tb_pp_result_bus;
  int checks = 0, failures = 0;
  logic        addop, shop, mulop;
  logic [31:0] add_y, sh_y, mul_y, bus, exp_bus;

  pp_result_bus dut (.addop, .shop, .mulop, .add_y, .sh_y, .mul_y, .bus);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      int sel;
      sel = $urandom_range(3);
      add_y = $urandom; sh_y = $urandom; mul_y = $urandom;
      addop = (sel == 1); shop = (sel == 2); mulop = (sel == 3);
      #1;
      exp_bus = (sel == 1) ? add_y : (sel == 2) ? sh_y : (sel == 3) ? mul_y : 32'd0;
      checks++;
      if (bus !== exp_bus) begin
        failures++;
        $display("FAIL sel=%0d bus=%h exp=%h", sel, bus, exp_bus);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
