// tb_adder_subtractor: self-checking test of the ripple adder-subtractor.
// Applies corner values and random operands in both modes and compares the
// sum/difference, carry out and signed overflow with values computed here
// with plain SystemVerilog arithmetic.
module tb_adder_subtractor;
  localparam int N = 32;
  logic [N-1:0] a, b, y;
  logic sub, cout, overflow;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  adder_subtractor #(.N(N)) dut (.a, .b, .sub, .y, .cout, .overflow);

  task automatic check_one(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic ts);
    logic [N:0] full;
    logic [N-1:0] exp_y;
    logic exp_c, exp_v;
    a = ta; b = tb_; sub = ts;
    #1;
    full  = ts ? ({1'b0, ta} + {1'b0, ~tb_} + 1) : ({1'b0, ta} + {1'b0, tb_});
    exp_y = full[N-1:0];
    exp_c = full[N];
    exp_v = ts ? ((ta[N-1] != tb_[N-1]) && (exp_y[N-1] != ta[N-1]))
               : ((ta[N-1] == tb_[N-1]) && (exp_y[N-1] != ta[N-1]));
    checks++;
    if (y !== exp_y || cout !== exp_c || overflow !== exp_v) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%0d y=%h/%h c=%0d/%0d v=%0d/%0d",
               ta, tb_, ts, y, exp_y, cout, exp_c, overflow, exp_v);
    end
  endtask

  initial begin
    check_one(32'd0, 32'd0, 0);
    check_one(32'd0, 32'd0, 1);
    check_one(32'hFFFF_FFFF, 32'd1, 0);
    check_one(32'd0, 32'd1, 1);
    check_one(32'h7FFF_FFFF, 32'd1, 0);
    check_one(32'h8000_0000, 32'd1, 1);
    check_one(32'd7, 32'd7, 1);
    for (int i = 0; i < 2000; i++) check_one($urandom, $urandom, 1'($urandom));
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
