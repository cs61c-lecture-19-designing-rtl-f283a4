// register_file: the MIPS general-purpose registers, 32 registers of 32 bits.
//
// Two read ports and one write port. ra selects the register put on busA and
// rb the one put on busB; reads are combinational, so busA/busB follow ra/rb
// after the access time with no clock involved. rw selects the register that
// takes busW on the rising edge of clk when we is 1; the clock matters only
// for writes. Register 0 always reads as zero and ignores writes, as MIPS
// requires of $zero (this design's choice of where to enforce it). A read of
// the register being written in the same cycle returns the old value; the new
// value appears after the edge.
module register_file #(
  parameter int unsigned NREG = 32,
  parameter int unsigned W    = 32,
  localparam int unsigned AW  = $clog2(NREG)
) (
  input  logic          clk,
  input  logic [AW-1:0] ra,
  input  logic [AW-1:0] rb,
  input  logic [AW-1:0] rw,
  input  logic          we,
  input  logic [W-1:0]  busW,
  output logic [W-1:0]  busA,
  output logic [W-1:0]  busB
);
  logic [W-1:0] regs [NREG];

  always_ff @(posedge clk) begin
    if (we && rw != '0) regs[rw] <= busW;
  end

  always_comb begin
    busA = (ra == '0) ? '0 : regs[ra];
    busB = (rb == '0) ? '0 : regs[rb];
  end
endmodule
