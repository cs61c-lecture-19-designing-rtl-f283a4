// instruction_fetch_unit: program counter, instruction memory and next-PC
// logic of the single-cycle CPU.
//
// Every cycle the instruction memory is read at the PC (combinationally) and
// one adder forms PC + 4. A second adder adds SignExt(imm16) x 4 (the
// immediate shifted left by two) to PC + 4 to form the branch target. On the
// rising clock edge the PC register loads the target if nPC_sel is 1 (the
// controller sets it for a BEQ whose Equal condition holds), otherwise PC + 4. The PC register is written every
// cycle; reset (synchronous, active high) puts it at RESET_PC.
//
// Program loading is this design's addition: while load_we is 1 the
// instruction memory is addressed by load_addr and written with load_data
// instead of being read at the PC. It is meant to be used with rst held.
module instruction_fetch_unit
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_AW  = 10,        // log2 instruction-memory words
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        nPC_sel,   // 1: next PC is the branch target
  // program-load port
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  // fetched instruction
  output logic [31:0] instr,
  output logic [31:0] pc
);
  logic [31:0] pc_plus4, br_offset, br_target, next_pc, imem_addr;
  logic        unused_c0, unused_c1;

  we_register #(.N(32), .RESET_VAL(RESET_PC)) u_pc (
    .clk(clk), .rst(rst), .we(1'b1), .d(next_pc), .q(pc)
  );

  adder #(.N(32)) u_inc (
    .a(pc), .b(32'd4), .cin(1'b0), .y(pc_plus4), .cout(unused_c0)
  );

  // SignExt(imm16) x 4
  assign br_offset = {{14{instr[15]}}, instr[15:0], 2'b00};

  adder #(.N(32)) u_br (
    .a(pc_plus4), .b(br_offset), .cin(1'b0), .y(br_target), .cout(unused_c1)
  );

  mux2 #(.N(32)) u_npc (
    .d0(pc_plus4), .d1(br_target), .sel(nPC_sel), .y(next_pc)
  );

  assign imem_addr = load_we ? load_addr : pc;

  ideal_memory #(.W(32), .AW(IMEM_AW)) u_imem (
    .clk(clk), .addr(imem_addr), .we(load_we), .data_in(load_data), .data_out(instr)
  );
endmodule
