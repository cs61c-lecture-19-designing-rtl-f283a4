// alu: the MIPS-lite arithmetic-logic unit.
//
// ALUctr selects A + B, A - B or A | B. Addition and subtraction share one
// ripple adder-subtractor (XOR gates on B as a conditional inverter, the
// subtract bit as carry-in); OR is a separate bitwise path. zero is 1 when the
// result is all zeros, so subtracting and testing zero gives the A == B test
// used by BEQ. The operations follow the instructions the CPU must run; the
// 2-bit ALUctr encoding is this design's own. Combinational. Arithmetic is
// unsigned-style (ADDU/SUBU): overflow is not reported.
module alu
  import mips_lite_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  alu_op_e      alu_ctr,
  output logic [N-1:0] result,
  output logic         zero
);
  logic [N-1:0] sum;
  logic         unused_cout, unused_ovf;

  adder_subtractor #(.N(N)) u_addsub (
    .a       (a),
    .b       (b),
    .sub     (alu_ctr == ALU_SUB),
    .y       (sum),
    .cout    (unused_cout),
    .overflow(unused_ovf)
  );

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD, ALU_SUB: result = sum;
      ALU_OR:           result = a | b;
      default:          result = sum;
    endcase
    zero = (result == '0);
  end
endmodule
