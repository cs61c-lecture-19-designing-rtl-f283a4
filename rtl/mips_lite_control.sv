// mips_lite_control: the controller of the single-cycle MIPS-lite CPU.
//
// Purely combinational: it looks only at the opcode, for R-type the funct
// field, and the Equal condition from the datapath, and sets the control points of the datapath for the one cycle
// the instruction takes. The settings come from the register transfer of each
// instruction:
//   ADDU/SUBU  RegDst=1 ALUSrc=0 ALUctr=ADD/SUB RegWr=1 MemtoReg=0
//   ORI        RegDst=0 ALUSrc=1 ExtOp=0 (zero)  ALUctr=OR  RegWr=1
//   LW         RegDst=0 ALUSrc=1 ExtOp=1 (sign)  ALUctr=ADD RegWr=1 MemtoReg=1
//   SW                  ALUSrc=1 ExtOp=1         ALUctr=ADD MemWr=1
//   BEQ        ALUSrc=0 ALUctr=SUB nPC_sel=Equal (PC takes the target)
// Any other opcode or funct writes nothing and advances the PC by 4 (this
// design's choice; the instruction subset does not define it). Equal is the
// ALU zero flag, so it is valid only while ALUctr = SUB, i.e. during BEQ.
module mips_lite_control
  import mips_lite_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  input  logic       equal,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl          = '0;
    ctrl.ALUctr   = ALU_ADD;
    unique case (op)
      OP_RTYPE: begin
        if (funct == FN_ADDU || funct == FN_SUBU) begin
          ctrl.RegDst = 1'b1;
          ctrl.RegWr  = 1'b1;
          ctrl.ALUctr = (funct == FN_SUBU) ? ALU_SUB : ALU_ADD;
        end
      end
      OP_ORI: begin
        ctrl.ALUSrc = 1'b1;
        ctrl.ExtOp  = 1'b0;
        ctrl.ALUctr = ALU_OR;
        ctrl.RegWr  = 1'b1;
      end
      OP_LW: begin
        ctrl.ALUSrc   = 1'b1;
        ctrl.ExtOp    = 1'b1;
        ctrl.ALUctr   = ALU_ADD;
        ctrl.RegWr    = 1'b1;
        ctrl.MemtoReg = 1'b1;
      end
      OP_SW: begin
        ctrl.ALUSrc = 1'b1;
        ctrl.ExtOp  = 1'b1;
        ctrl.ALUctr = ALU_ADD;
        ctrl.MemWr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.ExtOp   = 1'b1;
        ctrl.ALUctr  = ALU_SUB;
        ctrl.nPC_sel = equal;
      end
      default: ;
    endcase
  end
endmodule
