// ideal_memory: the idealized memory of the single-cycle datapath.
//
// One input bus (data_in), one output bus (data_out), an address and a write
// enable. Reads are combinational: data_out follows addr after the access
// time, with no clock. Writes happen on the rising edge of clk when we = 1,
// to the word addr selects. Addresses are byte addresses of 32-bit words, so
// the two low bits are ignored and bits [AW+1:2] select one of 2**AW words;
// higher bits wrap. Word addressing, the depth (1024 words) and the clearing
// of the array at time zero are this design's choices. The CPU uses two
// copies, one for instructions and one for data.
module ideal_memory #(
  parameter int unsigned W  = 32,
  parameter int unsigned AW = 10    // log2 of the depth in words
) (
  input  logic         clk,
  input  logic [31:0]  addr,
  input  logic         we,
  input  logic [W-1:0] data_in,
  output logic [W-1:0] data_out
);
  logic [W-1:0]  mem [2**AW];
  logic [AW-1:0] widx;

  assign widx = addr[AW+1:2];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= data_in;
  end

  always_comb begin
    data_out = mem[widx];
  end
endmodule
