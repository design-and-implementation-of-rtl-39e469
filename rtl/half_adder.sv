// Half adder: a + b = sum + 2*carry. Used where a reduction-tree column
// exceeds its target height by exactly one bit.
// Interface: inputs a, b; outputs sum, carry. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
