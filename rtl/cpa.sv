// Carry-propagate adder, the multiplier's final stage: it adds the two rows
// left by the compressor tree into the product. Written as a plain W-bit
// addition, which synthesis maps to an adder of its choice; the result is
// taken modulo 2^W, which for the two rows of an N x N product loses nothing.
// Interface: inputs a, b (W bits); output s (W bits). Combinational.
module cpa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  always_comb s = a + b;
endmodule
