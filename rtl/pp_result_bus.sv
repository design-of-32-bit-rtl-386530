// pp_result_bus: write-back bus of the function units.
//
// The block diagram shows one output buffer per function unit, enabled by
// ADDOP, SHOP or MULOP, joining onto one 32-bit bus that goes back to the
// register files. Here the buffers are an AND-OR select: each unit's result
// is ANDed with its select and the three are ORed. At most one select may be
// high (the assertion stands for the bus-contention rule of the buffers);
// with none high the bus is zero. Combinational; the register file samples it
// on the clock edge, which stands for the clocked buffer of the diagram.
module pp_result_bus #(
  parameter int unsigned XLEN = pp_pkg::XLEN
) (
  input  logic            addop,
  input  logic            shop,
  input  logic            mulop,
  input  logic [XLEN-1:0] add_y,
  input  logic [XLEN-1:0] sh_y,
  input  logic [XLEN-1:0] mul_y,
  output logic [XLEN-1:0] bus
);

  assign bus = ({XLEN{addop}} & add_y)
             | ({XLEN{shop}}  & sh_y)
             | ({XLEN{mulop}} & mul_y);

  always_comb assert ($onehot0({addop, shop, mulop}))
    else $error("result bus: more than one unit selected");

endmodule
