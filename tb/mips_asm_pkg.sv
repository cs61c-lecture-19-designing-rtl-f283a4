// mips_asm_pkg: testbench helpers that assemble MIPS-lite instructions
// (ADDU, SUBU, ORI, LW, SW, BEQ) into 32-bit words using the standard MIPS
// field layout and encodings. Written independently of the RTL package so
// that the testbenches do not reuse the design's own constants.
package mips_asm_pkg;
  function automatic logic [31:0] asm_addu(int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h21};
  endfunction
  function automatic logic [31:0] asm_subu(int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, 6'h23};
  endfunction
  function automatic logic [31:0] asm_ori(int rt, int rs, int imm);
    return {6'h0D, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] asm_lw(int rt, int imm, int rs);
    return {6'h23, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] asm_sw(int rt, int imm, int rs);
    return {6'h2B, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] asm_beq(int rs, int rt, int off);
    return {6'h04, 5'(rs), 5'(rt), 16'(off)};
  endfunction
endpackage
