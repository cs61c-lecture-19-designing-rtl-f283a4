// mips_lite_datapath: the single-cycle datapath for ADDU, SUBU, ORI, LW, SW
// and BEQ.
//
// Instruction fetch unit -> register file (Ra = rs, Rb = rt, Rw = rd or rt by
// RegDst) -> ALU (B input = busB or the extended imm16 by ALUSrc) -> data
// memory (address = ALU result, Data In = busB, written when MemWr) -> busW
// (ALU result or memory output by MemtoReg), written back when RegWr. All
// storage (PC, registers, data memory) is clocked by the same rising edge; one
// long cycle covers fetch, decode/read, execute, memory and write-back.
// Equal is the ALU's zero output, valid for BEQ because the controller then
// selects subtraction of busB from busA. The datapath hands the fetched
// instruction to the controller and takes its control points back.
module mips_lite_datapath
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_AW  = 10,
  parameter int unsigned DMEM_AW  = 10,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  // program-load port into the instruction memory
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  output logic [31:0] instr,
  output logic [31:0] pc,
  output logic        equal
);
  logic [4:0]  rw;
  logic [31:0] busA, busB, busW, imm_ext, alu_b, alu_out, dmem_out;

  instruction_fetch_unit #(.IMEM_AW(IMEM_AW), .RESET_PC(RESET_PC)) u_ifu (
    .clk(clk), .rst(rst), .nPC_sel(ctrl.nPC_sel),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .instr(instr), .pc(pc)
  );

  mux2 #(.N(5)) u_regdst (
    .d0(instr[20:16]), .d1(instr[15:11]), .sel(ctrl.RegDst), .y(rw)
  );

  register_file #(.NREG(NREG), .W(XLEN)) u_rf (
    .clk(clk), .ra(instr[25:21]), .rb(instr[20:16]), .rw(rw),
    .we(ctrl.RegWr & ~rst), .busW(busW), .busA(busA), .busB(busB)
  );

  extender #(.IN_W(16), .OUT_W(32)) u_ext (
    .imm(instr[15:0]), .ext_op(ctrl.ExtOp), .y(imm_ext)
  );

  mux2 #(.N(32)) u_alusrc (
    .d0(busB), .d1(imm_ext), .sel(ctrl.ALUSrc), .y(alu_b)
  );

  alu #(.N(32)) u_alu (
    .a(busA), .b(alu_b), .alu_ctr(ctrl.ALUctr), .result(alu_out), .zero(equal)
  );

  ideal_memory #(.W(32), .AW(DMEM_AW)) u_dmem (
    .clk(clk), .addr(alu_out), .we(ctrl.MemWr & ~rst), .data_in(busB), .data_out(dmem_out)
  );

  mux2 #(.N(32)) u_memtoreg (
    .d0(alu_out), .d1(dmem_out), .sel(ctrl.MemtoReg), .y(busW)
  );
endmodule
