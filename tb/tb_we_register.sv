// tb_we_register: self-checking test of the write-enable register. Random
// data and enables each cycle; a model register tracks the expected value:
// q changes only on a rising edge with we = 1, and reset loads RESET_VAL.
module tb_we_register;
  localparam int N = 32;
  localparam logic [N-1:0] RV = 32'h0040_0000;
  logic clk = 0, rst, we;
  logic [N-1:0] d, q, model;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  we_register #(.N(N), .RESET_VAL(RV)) dut (.clk, .rst, .we, .d, .q);

  initial begin
    rst = 1; we = 0; d = '0;
    @(posedge clk); #1;
    model = RV;
    rst = 0;
    checks++;
    if (q !== model) begin failures++; $display("FAIL reset q=%h", q); end
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom); d = $urandom;
      rst = ($urandom % 50) == 0;
      #2;                          // between edges: q must not follow d
      checks++;
      if (q !== model) begin failures++; $display("FAIL mid-cycle q=%h exp=%h", q, model); end
      @(posedge clk); #1;
      if (rst) model = RV; else if (we) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL cyc %0d we=%0d q=%h exp=%h", i, we, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
