// pp_pkg: widths, instruction format and opcodes shared by the processor core.
//
// The core is 32 bits wide with a 16x16 multiplier and a shifter whose shift
// amount is 4 bits; those three numbers come from the published design. The
// instruction encoding, the opcode set and the register count (16) are this
// design's own choice, since no instruction set was published for the core.
//
// Instruction word (32 bits):
//   [31:28] opcode   [27:24] rd   [23:20] rs1   [19:16] rs2
//   [15:12] RFSel    [11:8]  PUSel               [7:0]  unused (write 0)
package pp_pkg;

  localparam int unsigned XLEN    = 32;  // datapath width
  localparam int unsigned MUL_W   = 16;  // multiplier operand width
  localparam int unsigned SHAMT_W = 4;   // shifter shift-amount width
  localparam int unsigned NREGS   = 16;  // registers in the register file
  localparam int unsigned RA_W    = $clog2(NREGS);

  typedef enum logic [3:0] {
    OP_NOP = 4'd0,
    OP_ADD = 4'd1,   // rd = rs1 + rs2
    OP_SUB = 4'd2,   // rd = rs1 - rs2
    OP_SHL = 4'd3,   // rd = rs1 << rs2[3:0]
    OP_SHR = 4'd4,   // rd = rs1 >> rs2[3:0] (logical)
    OP_SRA = 4'd5,   // rd = rs1 >>> rs2[3:0] (arithmetic)
    OP_MUL = 4'd6,   // rd = rs1[15:0] * rs2[15:0] (unsigned)
    OP_LD  = 4'd7,   // rd = D<31:0>
    OP_ST  = 4'd8    // D<31:0> = rs1 (driven in the next cycle)
  } opcode_e;

  typedef struct packed {
    opcode_e    op;
    logic [3:0] rd;
    logic [3:0] rs1;
    logic [3:0] rs2;
    logic [3:0] rfsel;
    logic [3:0] pusel;
    logic [7:0] unused;
  } instr_t;

  typedef enum logic [1:0] {
    SH_LL = 2'd0,   // logical left
    SH_RL = 2'd1,   // logical right
    SH_RA = 2'd2    // arithmetic right
  } shmode_e;

  // Write-back source for the register file.
  typedef enum logic {
    WB_BUS = 1'b0,  // result bus from the function units
    WB_DIN = 1'b1   // DIN from the load/store unit
  } wbsel_e;

  // Everything the decoder tells the rest of the core besides the
  // enable gating and result-bus select signals.
  typedef struct packed {
    logic [RA_W-1:0] rd;
    logic [RA_W-1:0] rs1;
    logic [RA_W-1:0] rs2;
    logic            rf_we;   // write rd at the end of the cycle
    wbsel_e          wb_sel;
    logic            sub;     // adder subtracts
    shmode_e         sh_mode;
    logic            ld;
    logic            st;
  } ctrl_t;

  // Helper to build instruction words in testbenches and programs.
  function automatic logic [31:0] mk_instr(opcode_e op, logic [3:0] rd, logic [3:0] rs1,
                                           logic [3:0] rs2, logic [3:0] rfsel = 4'd0,
                                           logic [3:0] pusel = 4'd0);
    instr_t i;
    i = '{op: op, rd: rd, rs1: rs1, rs2: rs2, rfsel: rfsel, pusel: pusel, unused: 8'd0};
    return i;
  endfunction

endpackage
