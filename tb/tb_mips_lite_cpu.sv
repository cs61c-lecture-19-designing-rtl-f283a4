// tb_mips_lite_cpu: end-to-end test of the single-cycle MIPS-lite CPU at
// its default sizes (1024-word instruction and data memories).
//
// The testbench generates a program, loads it through the load port while
// the CPU is held in reset, and then runs it against an instruction-level
// reference model written here from the register transfers:
//   ADDU R[rd] = R[rs] + R[rt]          SUBU R[rd] = R[rs] - R[rt]
//   ORI  R[rt] = R[rs] | ZeroExt(imm)   LW   R[rt] = M[R[rs] + SignExt(imm)]
//   SW   M[R[rs] + SignExt(imm)] = R[rt]
//   BEQ  PC = PC + 4 + SignExt(imm)*4 if R[rs] == R[rt], else PC + 4
// Every cycle it checks that the CPU is executing the instruction the model
// expects (same PC, so exactly one instruction per clock) and, after the
// edge, all 32 registers and the data-memory word a store wrote. At the end
// it compares the whole data memory.
//
// The program is a register-initialisation prologue, a counted loop closed
// by a backward BEQ, a long random section (random ADDU/SUBU/ORI, loads and
// stores with positive and negative offsets from base registers, forward
// BEQs over random distances), and a final BEQ $0,$0,-1 that holds the PC.
// Each mechanism is counted and must occur at least once: every
// instruction type, taken and untaken BEQ, a backward branch, a negative
// load/store offset, a zero-extended ORI immediate with bit 15 set, a write
// to register 0 being discarded, a load reading a value stored earlier.
module tb_mips_lite_cpu;
  import mips_asm_pkg::*;
  localparam int IWORDS = 1024;
  localparam int DWORDS = 1024;
  localparam int NPROG  = 1000;

  logic clk = 0, rst, load_we;
  logic [31:0] load_addr, load_data, pc, instr;
  always #5 clk = ~clk;

  mips_lite_cpu dut (.clk, .rst, .load_we, .load_addr, .load_data, .pc, .instr);

  // reference model state
  logic [31:0] prog [IWORDS];
  logic [31:0] R [32];
  logic [31:0] M [DWORDS];
  logic        M_written [DWORDS];
  logic [31:0] mpc;

  int checks = 0, failures = 0, cycles = 0;
  int n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_taken, n_beq_not, n_back;
  int n_negoff, n_ori_hi, n_r0_write, n_lw_stored;

  function automatic logic [31:0] sext(input logic [15:0] i);
    return {{16{i[15]}}, i};
  endfunction

  // one instruction of the model; returns the data word index written, or -1
  function automatic int model_step();
    logic [31:0] w, a;
    logic [4:0] rs, rt, rd;
    int widx = -1;
    w  = prog[mpc[11:2]];
    rs = w[25:21]; rt = w[20:16]; rd = w[15:11];
    case (w[31:26])
      6'h00: begin
        if (w[5:0] == 6'h21) begin n_addu++; if (rd != 0) R[rd] = R[rs] + R[rt]; else n_r0_write++; end
        if (w[5:0] == 6'h23) begin n_subu++; if (rd != 0) R[rd] = R[rs] - R[rt]; else n_r0_write++; end
        mpc = mpc + 4;
      end
      6'h0D: begin
        n_ori++; if (w[15]) n_ori_hi++;
        if (rt != 0) R[rt] = R[rs] | {16'h0, w[15:0]}; else n_r0_write++;
        mpc = mpc + 4;
      end
      6'h23: begin
        n_lw++; if (w[15]) n_negoff++;
        a = R[rs] + sext(w[15:0]);
        if (M_written[a[11:2]]) n_lw_stored++;
        if (rt != 0) R[rt] = M[a[11:2]]; else n_r0_write++;
        mpc = mpc + 4;
      end
      6'h2B: begin
        n_sw++; if (w[15]) n_negoff++;
        a = R[rs] + sext(w[15:0]);
        M[a[11:2]] = R[rt]; M_written[a[11:2]] = 1; widx = int'(a[11:2]);
        mpc = mpc + 4;
      end
      6'h04: begin
        if (R[rs] == R[rt]) begin
          n_beq_taken++; if (w[15]) n_back++;
          mpc = mpc + 4 + {sext(w[15:0])[29:0], 2'b00};
        end else begin
          n_beq_not++;
          mpc = mpc + 4;
        end
      end
      default: mpc = mpc + 4;
    endcase
    return widx;
  endfunction

  // registers: $1 and $2 are base registers (never written after the
  // prologue), $3 is the loop counter, $4 holds 1.
  function automatic int rnd_dst();
    return (($urandom % 20) == 0) ? 0 : 5 + int'($urandom % 27);   // mostly 5..31, sometimes 0
  endfunction
  function automatic int rnd_src();
    return ($urandom % 32);
  endfunction

  task automatic build_program();
    int n = 0;
    prog[n++] = asm_ori(1, 0, 16'h0400);          // base 0x400: mid data memory
    prog[n++] = asm_ori(2, 0, 16'h0C00);          // base 0xC00: upper quarter
    prog[n++] = asm_ori(3, 0, 5);                 // loop count
    prog[n++] = asm_ori(4, 0, 1);
    for (int r = 5; r < 32; r++) prog[n++] = asm_ori(r, 0, int'($urandom % 65536));
    // counted loop: body, decrement, exit test, backward branch
    prog[n++] = asm_addu(5, 5, 6);                // loop:
    prog[n++] = asm_sw(5, -8, 2);
    prog[n++] = asm_subu(3, 3, 4);
    prog[n++] = asm_beq(3, 0, 1);                 // exit when counter is 0
    prog[n++] = asm_beq(0, 0, -5);                // back to loop
    while (n < NPROG - 1) begin
      int k = $urandom % 12;
      int base = ($urandom % 2) ? 1 : 2;
      int off  = (int'($urandom % 256) - 128) * 4;   // -512 .. +508 bytes
      case (k)
        0, 1:    prog[n++] = asm_addu(rnd_dst(), rnd_src(), rnd_src());
        2, 3:    prog[n++] = asm_subu(rnd_dst(), rnd_src(), rnd_src());
        4, 5:    prog[n++] = asm_ori(rnd_dst(), rnd_src(), int'($urandom % 65536));
        6, 7:    prog[n++] = asm_lw(rnd_dst(), off, base);
        8, 9:    prog[n++] = asm_sw(rnd_src(), off, base);
        default: begin
          // forward branch; equal operands half of the time
          int rs = rnd_src();
          int rt = ($urandom % 2) ? rs : rnd_src();
          int skip_n = $urandom % 4;
          if (n + 1 + skip_n >= NPROG - 1) skip_n = 0;
          prog[n++] = asm_beq(rs, rt, skip_n);
        end
      endcase
    end
    prog[n++] = asm_beq(0, 0, -1);                // halt: branch to itself
    for (int i = n; i < IWORDS; i++) prog[i] = asm_beq(0, 0, -1);
  endtask

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    int widx;
    int halt_cycles = 0;
    n_addu = 0; n_subu = 0; n_ori = 0; n_lw = 0; n_sw = 0; n_beq_taken = 0; n_beq_not = 0;
    n_back = 0; n_negoff = 0; n_ori_hi = 0; n_r0_write = 0; n_lw_stored = 0;
    build_program();
    // data memory and model start cleared; registers start from whatever
    // the CPU holds, which the prologue then overwrites except $0
    for (int i = 0; i < DWORDS; i++) begin M[i] = '0; M_written[i] = 0; end
    rst = 1; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < IWORDS; i++) begin
      load_we = 1; load_addr = 32'(i * 4); load_data = prog[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    rst = 0;
    R[0] = '0;
    for (int r = 1; r < 32; r++) R[r] = dut.u_dp.u_rf.regs[r];
    mpc = 32'h0;
    while (halt_cycles < 3) begin
      #1;
      chk("pc", pc, mpc);
      chk("instr", instr, prog[mpc[11:2]]);
      if (prog[mpc[11:2]] == asm_beq(0, 0, -1)) halt_cycles++;
      widx = model_step();
      @(posedge clk); #1;
      cycles++;
      for (int r = 1; r < 32; r++) chk($sformatf("R%0d after pc %h", r, pc), dut.u_dp.u_rf.regs[r], R[r]);
      if (widx >= 0) chk($sformatf("M[%0d]", widx), dut.u_dp.u_dmem.mem[widx], M[widx]);
    end
    for (int i = 0; i < DWORDS; i++) chk($sformatf("final M[%0d]", i), dut.u_dp.u_dmem.mem[i], M[i]);
    $display("cycles=%0d addu=%0d subu=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d",
             cycles, n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_taken, n_beq_not);
    $display("backward_branches=%0d negative_offsets=%0d ori_imm_bit15=%0d r0_writes=%0d loads_of_stored=%0d",
             n_back, n_negoff, n_ori_hi, n_r0_write, n_lw_stored);
    if (n_addu == 0 || n_subu == 0 || n_ori == 0 || n_lw == 0 || n_sw == 0 || n_beq_taken == 0 ||
        n_beq_not == 0 || n_back == 0 || n_negoff == 0 || n_ori_hi == 0 || n_r0_write == 0 ||
        n_lw_stored == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
