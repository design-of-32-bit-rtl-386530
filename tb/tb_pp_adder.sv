// tb_pp_adder: self-checking test of the gated 32-bit adder.
// Random and corner operands; checks a+b and a-b against the testbench's own
// arithmetic while enabled, and a zero output (gated operands) while disabled.
module tb_pp_adder;
  int checks = 0, failures = 0;
  logic        en, sub;
  logic [31:0] a, b, y, exp_y;

  pp_adder dut (.en, .sub, .a, .b, .y);

  task automatic check(string what);
    #1;
    exp_y = !en ? 32'd0 : sub ? 32'(64'(a) + 64'({32'd0, ~b}) + 64'd1) : 32'(64'(a) + 64'(b));
    checks++;
    if (y !== exp_y) begin
      failures++;
      $display("FAIL %s en=%0b sub=%0b a=%h b=%h y=%h exp=%h", what, en, sub, a, b, y, exp_y);
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
    en = 1; sub = 0; a = 32'hFFFF_FFFF; b = 32'd1; check("wrap");
    a = 32'h7FFF_FFFF; b = 32'd1; check("carry into msb");
    sub = 1; a = 32'd5; b = 32'd7; check("negative difference");
    a = 32'h8000_0000; b = 32'h8000_0000; check("equal");
    for (int i = 0; i < 500; i++) begin
      en = ($urandom_range(3) != 0); sub = $urandom_range(1);
      a = $urandom; b = $urandom;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
