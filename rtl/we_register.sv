// we_register: N-bit register with write enable, a D flip-flop widened to N
// bits. On a rising clock edge q takes d when we is asserted; with we
// deasserted q holds. A synchronous active-high reset loads RESET_VAL; the
// reset is this design's addition, so that the PC starts at a known address.
module we_register #(
  parameter int unsigned N         = 32,
  parameter logic [N-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VAL;
    else if (we) q <= d;
  end
endmodule
