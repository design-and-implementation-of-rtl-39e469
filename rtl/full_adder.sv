// Full adder, also called the 3-2 compressor: three bits of equal weight in,
// their sum (weight 1) and carry (weight 2) out, a + b + c = sum + 2*carry.
// It is the building cell of the 5-2 compressor and fills columns of the
// reduction trees where a compressor would be too large.
// Interface: inputs a, b, c; outputs sum, carry. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic p;
  always_comb begin
    p     = a ^ b;
    sum   = p ^ c;
    carry = (a & b) | (p & c);
  end
endmodule
