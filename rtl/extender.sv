// extender: widens the 16-bit immediate of an I-type instruction to 32 bits.
// ExtOp = 1 copies bit 15 into the upper bits (SignExt, used by LW, SW and
// BEQ); ExtOp = 0 fills them with zeros (ZeroExt, used by ORI).
// Combinational.
module extender #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  imm,
  input  logic             ext_op,
  output logic [OUT_W-1:0] y
);
  always_comb begin
    y = {{(OUT_W-IN_W){ext_op & imm[IN_W-1]}}, imm};
  end
endmodule
