// mips_lite_cpu: single-cycle MIPS-lite processor, datapath plus controller.
//
// Each instruction (ADDU, SUBU, ORI, LW, SW, BEQ) completes in one clock
// cycle: on each rising edge the PC, the destination register and, for SW,
// the data-memory word are updated together. The clock period must cover the
// critical path, which for LW runs through instruction memory, register
// file, ALU, data memory and back to the register file input.
//
// Ports: clk; rst (synchronous, active high) sets the PC to RESET_PC and
// blocks register and memory writes. While rst is held, load_we / load_addr /
// load_data write a program into the instruction memory, one 32-bit word per
// cycle at byte address load_addr. pc and instr show the instruction being
// executed in the current cycle. Memory depths (1024 words each) and the
// load port are this design's choices.
module mips_lite_cpu
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_AW  = 10,
  parameter int unsigned DMEM_AW  = 10,
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  output logic [31:0] pc,
  output logic [31:0] instr
);
  ctrl_t ctrl;
  logic  equal;

  mips_lite_control u_ctrl (
    .op(instr[31:26]), .funct(instr[5:0]), .equal(equal), .ctrl(ctrl)
  );

  mips_lite_datapath #(.IMEM_AW(IMEM_AW), .DMEM_AW(DMEM_AW), .RESET_PC(RESET_PC)) u_dp (
    .clk(clk), .rst(rst), .ctrl(ctrl),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .instr(instr), .pc(pc), .equal(equal)
  );

  // Program loading is only meant to happen while the CPU is held in reset.
  a_load_in_reset: assert property (@(posedge clk) load_we |-> rst)
    else $error("instruction memory written while the CPU runs");
endmodule
