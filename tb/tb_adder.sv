// tb_adder: self-checking test of the N-bit adder with carry in/out.
// Random and corner operands; reference is a wide SystemVerilog addition.
module tb_adder;
  localparam int N = 32;
  logic [N-1:0] a, b, y;
  logic cin, cout;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  adder #(.N(N)) dut (.a, .b, .cin, .y, .cout);

  task automatic check_one(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic tc);
    logic [N:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = 33'(ta) + 33'(tb_) + 33'(tc);
    checks++;
    if ({cout, y} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d got=%h exp=%h", ta, tb_, tc, {cout, y}, exp);
    end
  endtask

  initial begin
    check_one(32'h0000_0000, 32'd4, 0);
    check_one(32'hFFFF_FFFC, 32'd4, 0);
    check_one(32'hFFFF_FFFF, 32'd0, 1);
    for (int i = 0; i < 1000; i++) check_one($urandom, $urandom, 1'($urandom));
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
