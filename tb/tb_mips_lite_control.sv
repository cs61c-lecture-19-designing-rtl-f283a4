// tb_mips_lite_control: self-checking test of the controller. For every
// opcode value (all 64) and a set of funct values, with Equal at 0 and 1, it
// compares all control points with a table written from the register
// transfer of each instruction. Undefined instructions must write nothing
// and not branch.
module tb_mips_lite_control;
  import mips_lite_pkg::*;
  logic [5:0] op, funct;
  logic equal;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mips_lite_control dut (.op, .funct, .equal, .ctrl);

  // expected: {nPC_sel, RegWr, RegDst, ExtOp(x if ALU ignores), ALUSrc, ALUctr, MemWr, MemtoReg}
  task automatic check_one(input logic [5:0] o, input logic [5:0] f, input logic e);
    logic writes_reg, writes_mem, br, dst_rd, src_imm, sext, m2r, care_ext, care_dst;
    logic [1:0] aluop;     // 0 add 1 sub 2 or
    logic ok;
    op = o; funct = f; equal = e;
    #1;
    writes_reg = 0; writes_mem = 0; br = 0; dst_rd = 0; src_imm = 0; sext = 0; m2r = 0;
    aluop = 0; care_ext = 0; care_dst = 0;
    if (o == 6'h00 && f == 6'h21)      begin writes_reg = 1; dst_rd = 1; care_dst = 1; aluop = 0; end
    else if (o == 6'h00 && f == 6'h23) begin writes_reg = 1; dst_rd = 1; care_dst = 1; aluop = 1; end
    else if (o == 6'h0D) begin writes_reg = 1; src_imm = 1; sext = 0; care_ext = 1; care_dst = 1; aluop = 2; end
    else if (o == 6'h23) begin writes_reg = 1; src_imm = 1; sext = 1; care_ext = 1; care_dst = 1; m2r = 1; aluop = 0; end
    else if (o == 6'h2B) begin writes_mem = 1; src_imm = 1; sext = 1; care_ext = 1; aluop = 0; end
    else if (o == 6'h04) begin br = e; aluop = 1; end
    ok = (ctrl.RegWr == writes_reg) && (ctrl.MemWr == writes_mem) && (ctrl.nPC_sel == br);
    if (writes_reg || writes_mem || o == 6'h04) begin
      ok &= (ctrl.ALUSrc == src_imm) && (ctrl.ALUctr == alu_op_e'(aluop));
      if (care_ext) ok &= (ctrl.ExtOp == sext);
      if (care_dst) ok &= (ctrl.RegDst == dst_rd);
      if (writes_reg) ok &= (ctrl.MemtoReg == m2r);
    end
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL op=%h funct=%h equal=%0d ctrl=%b", o, f, e, ctrl);
    end
  endtask

  initial begin
    logic [5:0] fns [6] = '{6'h21, 6'h23, 6'h20, 6'h22, 6'h25, 6'h00};
    for (int o = 0; o < 64; o++)
      foreach (fns[k]) begin
        check_one(6'(o), fns[k], 1'b0);
        check_one(6'(o), fns[k], 1'b1);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
