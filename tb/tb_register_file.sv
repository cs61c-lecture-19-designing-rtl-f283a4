// tb_register_file: self-checking test of the 32 x 32 register file.
// Random writes and reads on both ports against an array model. Checks that
// reads are combinational (valid within the cycle, before any edge), that a
// write lands only on the rising edge and only with we = 1, and that
// register 0 reads zero whatever is written to it.
module tb_register_file;
  logic clk = 0, we;
  logic [4:0] ra, rb, rw;
  logic [31:0] busW, busA, busB;
  logic [31:0] model [32];
  int checks = 0, failures = 0, zero_writes = 0;
  always #5 clk = ~clk;

  register_file #(.NREG(32), .W(32)) dut (.clk, .ra, .rb, .rw, .we, .busW, .busA, .busB);

  task automatic check_reads();
    checks++;
    if (busA !== model[ra] || busB !== model[rb]) begin
      failures++;
      $display("FAIL ra=%0d busA=%h/%h rb=%0d busB=%h/%h", ra, busA, model[ra], rb, busB, model[rb]);
    end
  endtask

  initial begin
    // fill every register first so the model is fully known
    we = 1;
    for (int r = 0; r < 32; r++) begin
      rw = 5'(r); busW = $urandom; ra = 0; rb = 0;
      @(posedge clk); #1;
      model[r] = (r == 0) ? '0 : busW;
    end
    for (int i = 0; i < 2000; i++) begin
      we = 1'($urandom); rw = 5'($urandom); busW = $urandom;
      if (i % 17 == 0) begin rw = 0; we = 1; end
      if (rw == 0 && we) zero_writes++;
      ra = 5'($urandom); rb = (i % 5 == 0) ? rw : 5'($urandom);
      #1 check_reads();            // old value before the edge
      @(posedge clk); #1;
      if (we && rw != 0) model[rw] = busW;
      check_reads();               // new value after the edge
      ra = rw; #1 check_reads();   // read port follows address without a clock
    end
    checks++;
    if (zero_writes == 0) failures++;
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
