// mux2: N-bit 2-to-1 multiplexer, the "MUX" building block of the datapath.
// y = sel ? d1 : d0. Combinational. The datapath uses it for the RegDst,
// ALUSrc, MemtoReg and next-PC selections.
module mux2 #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] d0,
  input  logic [N-1:0] d1,
  input  logic         sel,
  output logic [N-1:0] y
);
  always_comb begin
    y = sel ? d1 : d0;
  end
endmodule
