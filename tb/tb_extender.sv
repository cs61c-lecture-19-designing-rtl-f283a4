// tb_extender: self-checking test of the immediate extender. Checks zero
// and sign extension of immediates with bit 15 clear and set, against the
// value of the immediate taken as an unsigned or signed integer.
module tb_extender;
  logic [15:0] imm;
  logic        ext_op;
  logic [31:0] y;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  extender #(.IN_W(16), .OUT_W(32)) dut (.imm, .ext_op, .y);

  task automatic check_one(input logic [15:0] ti, input logic te);
    int exp;
    imm = ti; ext_op = te;
    #1;
    exp = te ? int'(signed'(ti)) : int'(ti);
    checks++;
    if (y !== 32'(exp)) begin
      failures++;
      $display("FAIL imm=%h ext_op=%0d y=%h exp=%h", ti, te, y, exp);
    end
  endtask

  initial begin
    check_one(16'h8000, 1); check_one(16'h8000, 0);
    check_one(16'hFFFF, 1); check_one(16'hFFFF, 0);
    check_one(16'h7FFF, 1); check_one(16'h0000, 1);
    for (int i = 0; i < 500; i++) check_one(16'($urandom), 1'($urandom));
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
