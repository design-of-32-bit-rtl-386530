// tb_pp_instr_reg: self-checking test of the instruction register.
// Checks the reset value (NOP) and that each word appears one clock edge
// after it is applied, one word per cycle.
module tb_pp_instr_reg;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [31:0] instr_i, ir_o, prev;

  pp_instr_reg dut (.clk, .rst_n, .instr_i, .ir_o);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_i = 32'hDEAD_BEEF;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (ir_o !== 32'd0) begin failures++; $display("FAIL reset value %h", ir_o); end
    rst_n = 1;
    prev = instr_i;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk) instr_i = $urandom;
      prev = instr_i;
      @(posedge clk) #1;
      checks++;
      if (ir_o !== prev) begin failures++; $display("FAIL cycle %0d ir=%h exp=%h", i, ir_o, prev); end
    end
    // Asynchronous reset clears it mid-cycle.
    @(negedge clk) rst_n = 0; #1;
    checks++;
    if (ir_o !== 32'd0) begin failures++; $display("FAIL async reset %h", ir_o); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
