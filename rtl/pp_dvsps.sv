// pp_dvsps: behavioural model of the dynamic voltage scaling power supply
// (DVSPS). This is an analog power switch, not synthesizable logic.
//
// It switches the supply of one function unit between two rails: POUT is the
// full supply VDD (1.2 V in the published design) while PMCNT is high, and
// the reduced supply VDDL (0.8 V) while PMCNT is low. PMCNT is the unit's
// enable gating signal, so the instruction that selects a unit also raises
// its supply, and every unselected unit idles at VDDL; no voltage scheduler
// or DC-DC converter is involved. Rails are real values in volts. The model
// switches with no delay, which is its own simplification.
module pp_dvsps (
  input  real  vdd,
  input  real  vddl,
  input  logic pmcnt,
  output real  pout
);

  assign pout = pmcnt ? vdd : vddl;

endmodule
