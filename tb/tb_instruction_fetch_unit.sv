// tb_instruction_fetch_unit: self-checking test of the fetch unit. Loads
// random words into the instruction memory through the load port during
// reset, then runs with a random nPC_sel each cycle. Every cycle it checks
// that instr = mem[PC] and that the new PC is PC + 4, or
// PC + 4 + SignExt(imm16) * 4 when nPC_sel was 1. One fetch per cycle.
module tb_instruction_fetch_unit;
  localparam int AW = 6;
  logic clk = 0, rst, nPC_sel, load_we;
  logic [31:0] load_addr, load_data, instr, pc;
  logic [31:0] prog [2**AW];
  logic [31:0] exp_pc;
  int checks = 0, failures = 0, taken = 0, seq = 0;
  always #5 clk = ~clk;

  instruction_fetch_unit #(.IMEM_AW(AW), .RESET_PC(32'h0)) dut (
    .clk, .rst, .nPC_sel, .load_we, .load_addr, .load_data, .instr, .pc
  );

  initial begin
    rst = 1; nPC_sel = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < 2**AW; i++) begin
      prog[i] = $urandom;
      load_we = 1; load_addr = 32'(i * 4); load_data = prog[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    rst = 0;
    exp_pc = 0;
    for (int c = 0; c < 2000; c++) begin
      nPC_sel = 1'($urandom);
      #1;
      checks++;
      if (pc !== exp_pc || instr !== prog[exp_pc[AW+1:2]]) begin
        failures++;
        $display("FAIL cyc %0d pc=%h exp=%h instr=%h exp=%h", c, pc, exp_pc, instr, prog[exp_pc[AW+1:2]]);
      end
      if (nPC_sel) begin
        exp_pc = exp_pc + 4 + {{14{instr[15]}}, instr[15:0], 2'b00};
        taken++;
      end else begin
        exp_pc = exp_pc + 4;
        seq++;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (taken == 0 || seq == 0) failures++;
    $display("branches=%0d sequential=%0d", taken, seq);
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
