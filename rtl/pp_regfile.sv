// pp_regfile: register files of the processor core.
//
// NREGS registers of XLEN bits. Two combinational read ports (rs1, rs2) feed
// the function units over the 32-bit operand buses; the rs1 port also serves
// as DOUT, the store data handed to the load/store unit. One write port,
// written on the rising clock edge when we is high, takes either the result
// bus of the function units or DIN from the load/store unit (wb_sel). RB
// (rst_n, active low, asynchronous) clears every register. The connections
// (operand buses, DIN, DOUT, result bus, RB) follow the published block
// diagram; the register count and the single shared write port are this
// design's choice.
module pp_regfile
  import pp_pkg::wbsel_e, pp_pkg::WB_DIN;
#(
  parameter int unsigned XLEN  = pp_pkg::XLEN,
  parameter int unsigned NREGS = pp_pkg::NREGS,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [AW-1:0]   rs1,
  input  logic [AW-1:0]   rs2,
  output logic [XLEN-1:0] rdata1,
  output logic [XLEN-1:0] rdata2,
  output logic [XLEN-1:0] dout,      // to the load/store unit (store data)
  input  logic            we,
  input  logic [AW-1:0]   rd,
  input  wbsel_e          wb_sel,
  input  logic [XLEN-1:0] res_bus,   // from the function units
  input  logic [XLEN-1:0] din        // from the load/store unit (load data)
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[rd] <= (wb_sel == WB_DIN) ? din : res_bus;
    end
  end

  assign rdata1 = regs[rs1];
  assign rdata2 = regs[rs2];
  assign dout   = rdata1;

endmodule
