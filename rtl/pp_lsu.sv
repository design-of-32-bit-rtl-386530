// pp_lsu: load/store unit between the D<31:0> data bus and the register files.
//
// The bidirectional D<31:0> of the block diagram is split into d_i (into the
// core), d_o (out of the core) and d_oe (drive enable), so the core has no
// internal tristate.
//  * Load (ld high): D<31:0> is passed to DIN and the register file writes it
//    on the rising edge that ends the cycle.
//  * Store (st high): DOUT, the register read for the store, is registered on
//    the rising edge and driven on d_o with d_oe high for the whole next
//    cycle.
// The unit's place between D<31:0> and the register files follows the
// published block diagram; the timing of the bus is this design's choice, as
// none was published (nor an address bus: addressing is left to whatever
// drives D<31:0>).
module pp_lsu #(
  parameter int unsigned XLEN = pp_pkg::XLEN
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ld,
  input  logic            st,
  input  logic [XLEN-1:0] d_i,
  output logic [XLEN-1:0] d_o,
  output logic            d_oe,
  input  logic [XLEN-1:0] dout,   // store data from the register files
  output logic [XLEN-1:0] din     // load data to the register files
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_o  <= '0;
      d_oe <= 1'b0;
    end else begin
      d_oe <= st;
      if (st) d_o <= dout;
    end
  end

  // Load data is gated to zero when no load is under way, so the register
  // file's DIN input does not toggle with unrelated bus traffic.
  assign din = ld ? d_i : '0;

endmodule
