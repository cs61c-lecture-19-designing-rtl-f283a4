// tb_mux2: self-checking test of the 2-to-1 multiplexer with random data
// on both inputs and both select values.
module tb_mux2;
  localparam int N = 32;
  logic [N-1:0] d0, d1, y;
  logic sel;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  mux2 #(.N(N)) dut (.d0, .d1, .sel, .y);

  initial begin
    for (int i = 0; i < 500; i++) begin
      d0 = $urandom; d1 = $urandom; sel = 1'(i);
      if (d0 == d1) d1 = ~d0;
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0d d0=%h d1=%h y=%h", sel, d0, d1, y);
      end
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
