// mips_lite_pkg: types and constants shared by the MIPS-lite single-cycle CPU.
//
// The three 32-bit instruction formats (R, I, J) and their field boundaries
// (op 31:26, rs 25:21, rt 20:16, rd 15:11, shamt 10:6, funct 5:0, imm16 15:0)
// follow the MIPS instruction formats. The opcode and funct numbers are the
// standard MIPS encodings, which the CPU description does not list; they are
// this design's choice. The control-point bundle names the signals that the
// controller drives into the datapath.
package mips_lite_pkg;

  localparam int unsigned XLEN = 32;   // data path and instruction width
  localparam int unsigned NREG = 32;   // registers in the register file

  // Primary opcodes (instruction bits 31:26)
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_ORI   = 6'h0D,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // Function codes for R-type (instruction bits 5:0)
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUBU = 6'h23;

  // ALU operation select (ALUctr)
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_OR  = 2'd2
  } alu_op_e;

  // Control points driven by the controller into the datapath
  typedef struct packed {
    logic    nPC_sel;   // 1: PC takes the branch target (taken BEQ), 0: PC + 4
    logic    RegWr;     // write busW into register Rw on the clock edge
    logic    RegDst;    // 1: Rw = rd (R-type), 0: Rw = rt
    logic    ExtOp;     // 1: sign-extend imm16, 0: zero-extend
    logic    ALUSrc;    // 1: ALU B input = extended immediate, 0: busB
    alu_op_e ALUctr;    // ALU operation
    logic    MemWr;     // write busB into data memory on the clock edge
    logic    MemtoReg;  // 1: busW = data memory output, 0: busW = ALU result
  } ctrl_t;

endpackage
