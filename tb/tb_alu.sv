// tb_alu: self-checking test of the MIPS-lite ALU. For each operation
// (add, subtract, OR) it applies corner and random operands and compares the
// result and the zero flag with SystemVerilog arithmetic; it also checks that
// subtract-then-zero gives exactly the A == B test.
module tb_alu;
  import mips_lite_pkg::*;
  logic [31:0] a, b, result;
  alu_op_e alu_ctr;
  logic zero;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  alu #(.N(32)) dut (.a, .b, .alu_ctr, .result, .zero);

  task automatic check_one(input logic [31:0] ta, input logic [31:0] tb_, input alu_op_e op);
    logic [31:0] exp;
    a = ta; b = tb_; alu_ctr = op;
    #1;
    case (op)
      ALU_ADD: exp = ta + tb_;
      ALU_SUB: exp = ta - tb_;
      default: exp = ta | tb_;
    endcase
    checks++;
    if (result !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h res=%h exp=%h zero=%0d", op.name(), ta, tb_, result, exp, zero);
    end
    if (op == ALU_SUB) begin
      checks++;
      if (zero !== (ta == tb_)) begin failures++; $display("FAIL equal test a=%h b=%h", ta, tb_); end
    end
  endtask

  initial begin
    alu_op_e ops [3] = '{ALU_ADD, ALU_SUB, ALU_OR};
    foreach (ops[k]) begin
      check_one(32'h0, 32'h0, ops[k]);
      check_one(32'hFFFF_FFFF, 32'h1, ops[k]);
      check_one(32'h1234_5678, 32'h1234_5678, ops[k]);
      check_one(32'h8000_0000, 32'h8000_0000, ops[k]);
    end
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] x;
      x = $urandom;
      check_one(x, (i % 4 == 0) ? x : $urandom, ops[i % 3]);
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
