// tb_pp_regfile: self-checking test of the register files.
// Random writes from the result bus and from DIN, random reads on both
// ports, all compared with a shadow array kept by the testbench; checks that
// reset clears every register and that we low writes nothing.
module tb_pp_regfile;
  import pp_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic [3:0]  rs1, rs2, rd;
  logic [31:0] rdata1, rdata2, dout, res_bus, din;
  logic        we;
  wbsel_e      wb_sel;
  logic [31:0] shadow [16];

  pp_regfile dut (.clk, .rst_n, .rs1, .rs2, .rdata1, .rdata2, .dout, .we, .rd,
                  .wb_sel, .res_bus, .din);

  always #5 clk = ~clk;

  task automatic check_reads();
    #1;
    checks += 3;
    if (rdata1 !== shadow[rs1]) begin failures++; $display("FAIL r1[%0d]=%h exp %h", rs1, rdata1, shadow[rs1]); end
    if (rdata2 !== shadow[rs2]) begin failures++; $display("FAIL r2[%0d]=%h exp %h", rs2, rdata2, shadow[rs2]); end
    if (dout   !== shadow[rs1]) begin failures++; $display("FAIL dout[%0d]=%h", rs1, dout); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; rd = 0; wb_sel = WB_BUS; res_bus = 0; din = 0; rs1 = 0; rs2 = 0;
    for (int i = 0; i < 16; i++) shadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin rs1 = 4'(i); rs2 = 4'(15 - i); check_reads(); end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      we = $urandom_range(1); rd = 4'($urandom); wb_sel = wbsel_e'($urandom_range(1));
      res_bus = $urandom; din = $urandom;
      rs1 = 4'($urandom); rs2 = 4'($urandom);
      check_reads();
      @(posedge clk);
      if (we) shadow[rd] = (wb_sel == WB_DIN) ? din : res_bus;
      check_reads();
    end
    @(negedge clk) rst_n = 0;
    for (int i = 0; i < 16; i++) shadow[i] = 0;
    for (int i = 0; i < 16; i++) begin rs1 = 4'(i); rs2 = 4'(i); check_reads(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
