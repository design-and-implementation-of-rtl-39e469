// Top level: the two 8x8 compressor-based Dadda multipliers side by side.
// Both compute the same unsigned product of the shared operands m and n; one
// reduces its partial-product tree with 4-2 compressors (p42), the other with
// 5-2 compressors (p52). They are alternatives to compare in area, delay and
// power, so the top simply brings both results out.
// Interface: m, n (8-bit unsigned); p42, p52 (16 bits), each equal to m * n.
// Purely combinational, no clock or reset.
module mult8x8_top
  import mult_pkg::*;
(
  input  operand_t m,
  input  operand_t n,
  output product_t p42,
  output product_t p52
);
  dadda_mult_4_2 u_mult_4_2 (.m(m), .n(n), .p(p42));
  dadda_mult_5_2 u_mult_5_2 (.m(m), .n(n), .p(p52));
endmodule
