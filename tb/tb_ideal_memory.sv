// tb_ideal_memory: self-checking test of the idealized memory. Random word
// writes and reads against an array model; checks that data_out follows the
// address combinationally, that writes take effect only at the rising edge
// with we = 1, and that the two low address bits are ignored.
module tb_ideal_memory;
  localparam int AW = 6;
  logic clk = 0, we;
  logic [31:0] addr, data_in, data_out;
  logic [31:0] model [2**AW];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ideal_memory #(.W(32), .AW(AW)) dut (.clk, .addr, .we, .data_in, .data_out);

  task automatic check_read();
    checks++;
    if (data_out !== model[addr[AW+1:2]]) begin
      failures++;
      $display("FAIL addr=%h got=%h exp=%h", addr, data_out, model[addr[AW+1:2]]);
    end
  endtask

  initial begin
    for (int i = 0; i < 2**AW; i++) model[i] = '0;
    we = 0; addr = 0; data_in = 0;
    #1 check_read();
    for (int i = 0; i < 3000; i++) begin
      we = 1'($urandom); data_in = $urandom;
      addr = {24'($urandom), 8'($urandom)} & 32'(((2**AW) * 4) - 1);
      #1 check_read();
      @(posedge clk); #1;
      if (we) model[addr[AW+1:2]] = data_in;
      we = 0;
      check_read();
      addr = addr ^ 32'd3; #1 check_read();   // byte offset bits ignored
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
