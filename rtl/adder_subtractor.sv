// adder_subtractor: N-bit adder-subtractor built from N one-bit full adders.
//
// As in the classic construction, an XOR gate on each B input acts as a
// conditional inverter: with sub = 1 the adders see ~B and the carry chain
// starts at 1, so the result is A + ~B + 1 = A - B (two's complement). With
// sub = 0 it is A + B. The carries ripple from bit 0 to bit N-1.
// cout is the carry out of the top bit; overflow is the signed overflow
// (carry into the top bit XOR carry out of it).
// Interface: a, b, sub in; y, cout, overflow out. Purely combinational.
module adder_subtractor #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  output logic [N-1:0] y,
  output logic         cout,
  output logic         overflow
);
  logic [N-1:0] b_x;     // B after the conditional inverters
  logic [N:0]   carry;   // carry[i] is the carry into bit i

  always_comb begin
    b_x = b ^ {N{sub}};
  end
  assign carry[0] = sub;

  for (genvar i = 0; i < int'(N); i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b_x[i]),
      .cin (carry[i]),
      .sum (y[i]),
      .cout(carry[i+1])
    );
  end

  assign cout     = carry[N];
  assign overflow = carry[N] ^ carry[N-1];
endmodule
