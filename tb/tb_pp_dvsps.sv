// tb_pp_dvsps: self-checking test of the power-switch model.
// PMCNT high must give VDD (1.2 V), low must give VDDL (0.8 V); also tried
// with other rail values to show the output follows the rails.
module tb_pp_dvsps;
  int checks = 0, failures = 0;
  real  vdd, vddl, pout, exp_v;
  logic pmcnt;

  pp_dvsps dut (.vdd, .vddl, .pmcnt, .pout);

  task automatic check();
    #1;
    exp_v = pmcnt ? vdd : vddl;
    checks++;
    if (pout != exp_v) begin
      failures++;
      $display("FAIL pmcnt=%0b pout=%f exp=%f", pmcnt, pout, exp_v);
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
    vdd = 1.2; vddl = 0.8;
    // The enable sequence of the published operation diagram: off, on, off, on.
    pmcnt = 0; check();
    pmcnt = 1; check();
    pmcnt = 0; check();
    pmcnt = 1; check();
    for (int i = 0; i < 20; i++) begin
      vdd = 1.0 + 0.01 * i; vddl = 0.4 + 0.02 * i; pmcnt = $urandom_range(1);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
