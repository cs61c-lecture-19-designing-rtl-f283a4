// adder: N-bit binary adder with carry in and carry out, the "Adder"
// building block of the datapath. The instruction fetch unit uses two of
// them: one forms PC + 4, the other adds the shifted branch offset to it.
// Combinational: {cout, y} = a + b + cin.
module adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] y,
  output logic         cout
);
  always_comb begin
    {cout, y} = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, cin};
  end
endmodule
