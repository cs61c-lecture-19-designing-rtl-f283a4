// tb_mips_lite_datapath: self-checking test of the single-cycle datapath on
// its own, with the control points driven by the testbench (decoded here
// from the fetched instruction, independently of the RTL controller).
// A short directed program covers every register transfer: ORI (zero
// extension of a negative-looking immediate), ADDU, SUBU with a borrow, SW
// and LW with positive and negative offsets, a taken and a not-taken BEQ, and
// a discarded write to register 0. It checks the PC and the Equal output each
// cycle and the registers and memory words afterwards, using hand-worked
// expected values.
module tb_mips_lite_datapath;
  import mips_lite_pkg::*;
  import mips_asm_pkg::*;
  logic clk = 0, rst, load_we, equal;
  logic [31:0] load_addr, load_data, instr, pc;
  ctrl_t ctrl;
  logic [31:0] prog [16];
  logic [31:0] r8_before;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mips_lite_datapath #(.IMEM_AW(10), .DMEM_AW(10), .RESET_PC(32'h0)) dut (
    .clk, .rst, .ctrl, .load_we, .load_addr, .load_data, .instr, .pc, .equal
  );

  // testbench-side decode of the fetched word
  always_comb begin
    ctrl = '0;
    ctrl.ALUctr = ALU_ADD;
    case (instr[31:26])
      6'h00: begin ctrl.RegDst = 1; ctrl.RegWr = 1;
                   ctrl.ALUctr = (instr[5:0] == 6'h23) ? ALU_SUB : ALU_ADD; end
      6'h0D: begin ctrl.ALUSrc = 1; ctrl.RegWr = 1; ctrl.ALUctr = ALU_OR; end
      6'h23: begin ctrl.ALUSrc = 1; ctrl.ExtOp = 1; ctrl.RegWr = 1; ctrl.MemtoReg = 1; end
      6'h2B: begin ctrl.ALUSrc = 1; ctrl.ExtOp = 1; ctrl.MemWr = 1; end
      6'h04: begin ctrl.ALUctr = ALU_SUB; ctrl.nPC_sel = equal; end
      default: ;
    endcase
  end

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    int pcs [] = '{0, 4, 8, 12, 16, 20, 24, 28, 32, 36, 48, 52, 56, 60, 60, 60};
    prog[0]  = asm_ori (1, 0, 16'h1234);
    prog[1]  = asm_ori (2, 0, 16'h8001);
    prog[2]  = asm_addu(3, 1, 2);
    prog[3]  = asm_subu(4, 1, 2);
    prog[4]  = asm_ori (5, 0, 16'h0100);
    prog[5]  = asm_sw  (3, 8, 5);
    prog[6]  = asm_sw  (4, -4, 5);
    prog[7]  = asm_lw  (6, 8, 5);
    prog[8]  = asm_lw  (7, -4, 5);
    prog[9]  = asm_beq (6, 3, 2);        // taken: skips 10 and 11
    prog[10] = asm_ori (8, 0, 16'h0BAD);
    prog[11] = asm_ori (8, 0, 16'h0BAD);
    prog[12] = asm_beq (6, 7, 5);        // not taken
    prog[13] = asm_addu(0, 1, 1);        // write to $0 is discarded
    prog[14] = asm_addu(9, 0, 0);        // $0 must still read as zero
    prog[15] = asm_beq (0, 0, -1);       // stay here
    rst = 1; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < 16; i++) begin
      load_we = 1; load_addr = 32'(i * 4); load_data = prog[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    rst = 0;
    r8_before = dut.u_rf.regs[8];
    foreach (pcs[c]) begin
      #1;
      chk($sformatf("pc at cycle %0d", c), pc, 32'(pcs[c]));
      if (pc == 36) chk("Equal on taken beq", 32'(equal), 1);
      if (pc == 48) chk("Equal on untaken beq", 32'(equal), 0);
      @(posedge clk); #1;
    end
    chk("r1", dut.u_rf.regs[1], 32'h0000_1234);
    chk("r2", dut.u_rf.regs[2], 32'h0000_8001);
    chk("r3", dut.u_rf.regs[3], 32'h0000_9235);
    chk("r4", dut.u_rf.regs[4], 32'hFFFF_9233);
    chk("r5", dut.u_rf.regs[5], 32'h0000_0100);
    chk("r6", dut.u_rf.regs[6], 32'h0000_9235);
    chk("r7", dut.u_rf.regs[7], 32'hFFFF_9233);
    chk("r8 untouched by skipped instructions", dut.u_rf.regs[8], r8_before);
    chk("r9 = $0 + $0", dut.u_rf.regs[9], 32'h0);
    chk("mem[0x108]", dut.u_dmem.mem[32'h108 >> 2], 32'h0000_9235);
    chk("mem[0xFC]",  dut.u_dmem.mem[32'hFC >> 2],  32'hFFFF_9233);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
