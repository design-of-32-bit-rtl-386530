// tb_pp_lsu: self-checking test of the load/store unit.
// Loads must pass D<31:0> to DIN in the same cycle (zero otherwise); a store
// must drive the store data on d_o with d_oe high during exactly the next
// cycle.
module tb_pp_lsu;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0;
  logic        ld, st, d_oe;
  logic [31:0] d_i, d_o, dout, din;
  logic        exp_oe = 0;
  logic [31:0] exp_do = 0;

  pp_lsu dut (.clk, .rst_n, .ld, .st, .d_i, .d_o, .d_oe, .dout, .din);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = 0; st = 0; d_i = 0; dout = 0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (d_oe !== 1'b0) begin failures++; $display("FAIL d_oe after reset"); end
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ld = $urandom_range(1); st = !ld && ($urandom_range(1) == 1);
      d_i = $urandom; dout = $urandom;
      #1;
      checks++;
      if (din !== (ld ? d_i : 32'd0)) begin failures++; $display("FAIL din=%h", din); end
      @(posedge clk);
      exp_oe = st;
      if (st) exp_do = dout;
      #1;
      checks++;
      if (d_oe !== exp_oe || (exp_oe && d_o !== exp_do)) begin
        failures++;
        $display("FAIL store d_oe=%0b d_o=%h exp %0b %h", d_oe, d_o, exp_oe, exp_do);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
