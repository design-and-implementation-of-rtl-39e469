// 8x8 unsigned Dadda multiplier whose partial-product tree is reduced with
// 4-2 compressors.
// The multiplier has the three classic stages: an AND array forms the 64
// partial-product bits, a compressor tree reduces every column to at most two
// bits, and a carry-propagate adder adds the two remaining rows.
// Tree: Dadda's rule of reducing each column only as far as the next target
// height requires, applied lowest column first with target heights 4 and 2
// (8 -> 4 -> 2, two compressor levels). A 4-2 compressor takes four bits of a
// column plus, in its cin port, the cout of a compressor one column lower in
// the same level; its sum stays in the column and its carry moves one column
// up into the next level. Where a column needs less than a 4-2 compressor,
// a full or half adder is used. Unused cin ports are tied to 0.
// The choice of target heights and the exact bit-to-port assignment below are
// this design's own (the column structure is generated by a fixed greedy
// rule and written out as plain instances); the three stages and the use of
// 4-2 compressors in a Dadda tree follow the published design.
// Interface: m, n (8-bit unsigned), p = m * n (16 bits). Purely combinational,
// no clock; the result is valid one combinational delay after the operands.
module dadda_mult_4_2
  import mult_pkg::*;
(
  input  operand_t m,   // multiplicand
  input  operand_t n,   // multiplier
  output product_t p    // product m * n
);
  // Stage 1 of the multiplier: partial products pp[i][j] = m[j] & n[i].
  logic [OP_W-1:0] pp [OP_W];
  pp_gen #(.N(OP_W)) u_pp (.m(m), .n(n), .pp(pp));

  // Stage 2: compressor tree. Column heights (bit 15 .. bit 0) per level:
  //   level 0: 0 1 2 3 4 5 6 7 8 7 6 5 4 3 2 1
  //   level 1: 0 1 2 4 4 4 4 4 4 4 4 4 4 3 2 1
  //   level 2: 0 2 2 2 2 2 2 2 2 2 2 2 2 2 2 1
  // Cells used: 18 4-2 compressors, 0 5-2 compressors, 3 full adders, 3 half adders.
  logic s1_c4_0_sum, s1_c4_0_carry, s1_c5_0_sum, s1_c5_0_carry, s1_c5_0_cout, s1_c6_0_sum,
        s1_c6_0_carry, s1_c6_0_cout, s1_c6_1_sum, s1_c6_1_carry, s1_c7_0_sum, s1_c7_0_carry,
        s1_c7_0_cout, s1_c7_1_sum, s1_c7_1_carry, s1_c7_1_cout, s1_c8_0_sum, s1_c8_0_carry,
        s1_c8_0_cout, s1_c8_1_sum, s1_c8_1_carry, s1_c8_1_cout, s1_c9_0_sum, s1_c9_0_carry,
        s1_c9_0_cout, s1_c9_1_sum, s1_c9_1_carry, s1_c10_0_sum, s1_c10_0_carry, s1_c10_0_cout,
        s1_c11_0_sum, s1_c11_0_carry, s2_c2_0_sum, s2_c2_0_carry, s2_c3_0_sum, s2_c3_0_carry,
        s2_c3_0_cout, s2_c4_0_sum, s2_c4_0_carry, s2_c4_0_cout, s2_c5_0_sum, s2_c5_0_carry,
        s2_c5_0_cout, s2_c6_0_sum, s2_c6_0_carry, s2_c6_0_cout, s2_c7_0_sum, s2_c7_0_carry,
        s2_c7_0_cout, s2_c8_0_sum, s2_c8_0_carry, s2_c8_0_cout, s2_c9_0_sum, s2_c9_0_carry,
        s2_c9_0_cout, s2_c10_0_sum, s2_c10_0_carry, s2_c10_0_cout, s2_c11_0_sum, s2_c11_0_carry,
        s2_c11_0_cout, s2_c12_0_sum, s2_c12_0_carry, s2_c12_0_cout, s2_c13_0_sum, s2_c13_0_carry;

  // ---- stage 1: reduce every column to at most 4 bits ----
  half_adder u_s1_c4_0_ha (.a(pp[0][4]), .b(pp[1][3]), .sum(s1_c4_0_sum), .carry(s1_c4_0_carry));
  compressor_4_2 u_s1_c5_0_c42 (.x1(pp[0][5]), .x2(pp[1][4]), .x3(pp[2][3]), .x4(pp[3][2]), .cin(1'b0), .sum(s1_c5_0_sum), .carry(s1_c5_0_carry), .cout(s1_c5_0_cout));
  compressor_4_2 u_s1_c6_0_c42 (.x1(pp[0][6]), .x2(pp[1][5]), .x3(pp[2][4]), .x4(pp[3][3]), .cin(s1_c5_0_cout), .sum(s1_c6_0_sum), .carry(s1_c6_0_carry), .cout(s1_c6_0_cout));
  half_adder u_s1_c6_1_ha (.a(pp[4][2]), .b(pp[5][1]), .sum(s1_c6_1_sum), .carry(s1_c6_1_carry));
  compressor_4_2 u_s1_c7_0_c42 (.x1(pp[0][7]), .x2(pp[1][6]), .x3(pp[2][5]), .x4(pp[3][4]), .cin(s1_c6_0_cout), .sum(s1_c7_0_sum), .carry(s1_c7_0_carry), .cout(s1_c7_0_cout));
  compressor_4_2 u_s1_c7_1_c42 (.x1(pp[4][3]), .x2(pp[5][2]), .x3(pp[6][1]), .x4(pp[7][0]), .cin(1'b0), .sum(s1_c7_1_sum), .carry(s1_c7_1_carry), .cout(s1_c7_1_cout));
  compressor_4_2 u_s1_c8_0_c42 (.x1(pp[1][7]), .x2(pp[2][6]), .x3(pp[3][5]), .x4(pp[4][4]), .cin(s1_c7_0_cout), .sum(s1_c8_0_sum), .carry(s1_c8_0_carry), .cout(s1_c8_0_cout));
  compressor_4_2 u_s1_c8_1_c42 (.x1(pp[5][3]), .x2(pp[6][2]), .x3(pp[7][1]), .x4(s1_c7_1_cout), .cin(1'b0), .sum(s1_c8_1_sum), .carry(s1_c8_1_carry), .cout(s1_c8_1_cout));
  compressor_4_2 u_s1_c9_0_c42 (.x1(pp[2][7]), .x2(pp[3][6]), .x3(pp[4][5]), .x4(pp[5][4]), .cin(s1_c8_0_cout), .sum(s1_c9_0_sum), .carry(s1_c9_0_carry), .cout(s1_c9_0_cout));
  full_adder u_s1_c9_1_fa (.a(pp[6][3]), .b(pp[7][2]), .c(s1_c8_1_cout), .sum(s1_c9_1_sum), .carry(s1_c9_1_carry));
  compressor_4_2 u_s1_c10_0_c42 (.x1(pp[3][7]), .x2(pp[4][6]), .x3(pp[5][5]), .x4(pp[6][4]), .cin(s1_c9_0_cout), .sum(s1_c10_0_sum), .carry(s1_c10_0_carry), .cout(s1_c10_0_cout));
  full_adder u_s1_c11_0_fa (.a(pp[4][7]), .b(pp[5][6]), .c(pp[6][5]), .sum(s1_c11_0_sum), .carry(s1_c11_0_carry));
  // ---- stage 2: reduce every column to at most 2 bits ----
  half_adder u_s2_c2_0_ha (.a(pp[0][2]), .b(pp[1][1]), .sum(s2_c2_0_sum), .carry(s2_c2_0_carry));
  compressor_4_2 u_s2_c3_0_c42 (.x1(pp[0][3]), .x2(pp[1][2]), .x3(pp[2][1]), .x4(pp[3][0]), .cin(1'b0), .sum(s2_c3_0_sum), .carry(s2_c3_0_carry), .cout(s2_c3_0_cout));
  compressor_4_2 u_s2_c4_0_c42 (.x1(pp[2][2]), .x2(pp[3][1]), .x3(pp[4][0]), .x4(s1_c4_0_sum), .cin(s2_c3_0_cout), .sum(s2_c4_0_sum), .carry(s2_c4_0_carry), .cout(s2_c4_0_cout));
  compressor_4_2 u_s2_c5_0_c42 (.x1(pp[4][1]), .x2(pp[5][0]), .x3(s1_c4_0_carry), .x4(s1_c5_0_sum), .cin(s2_c4_0_cout), .sum(s2_c5_0_sum), .carry(s2_c5_0_carry), .cout(s2_c5_0_cout));
  compressor_4_2 u_s2_c6_0_c42 (.x1(pp[6][0]), .x2(s1_c5_0_carry), .x3(s1_c6_0_sum), .x4(s1_c6_1_sum), .cin(s2_c5_0_cout), .sum(s2_c6_0_sum), .carry(s2_c6_0_carry), .cout(s2_c6_0_cout));
  compressor_4_2 u_s2_c7_0_c42 (.x1(s1_c6_0_carry), .x2(s1_c6_1_carry), .x3(s1_c7_0_sum), .x4(s1_c7_1_sum), .cin(s2_c6_0_cout), .sum(s2_c7_0_sum), .carry(s2_c7_0_carry), .cout(s2_c7_0_cout));
  compressor_4_2 u_s2_c8_0_c42 (.x1(s1_c7_0_carry), .x2(s1_c7_1_carry), .x3(s1_c8_0_sum), .x4(s1_c8_1_sum), .cin(s2_c7_0_cout), .sum(s2_c8_0_sum), .carry(s2_c8_0_carry), .cout(s2_c8_0_cout));
  compressor_4_2 u_s2_c9_0_c42 (.x1(s1_c8_0_carry), .x2(s1_c8_1_carry), .x3(s1_c9_0_sum), .x4(s1_c9_1_sum), .cin(s2_c8_0_cout), .sum(s2_c9_0_sum), .carry(s2_c9_0_carry), .cout(s2_c9_0_cout));
  compressor_4_2 u_s2_c10_0_c42 (.x1(pp[7][3]), .x2(s1_c9_0_carry), .x3(s1_c9_1_carry), .x4(s1_c10_0_sum), .cin(s2_c9_0_cout), .sum(s2_c10_0_sum), .carry(s2_c10_0_carry), .cout(s2_c10_0_cout));
  compressor_4_2 u_s2_c11_0_c42 (.x1(pp[7][4]), .x2(s1_c10_0_cout), .x3(s1_c10_0_carry), .x4(s1_c11_0_sum), .cin(s2_c10_0_cout), .sum(s2_c11_0_sum), .carry(s2_c11_0_carry), .cout(s2_c11_0_cout));
  compressor_4_2 u_s2_c12_0_c42 (.x1(pp[5][7]), .x2(pp[6][6]), .x3(pp[7][5]), .x4(s1_c11_0_carry), .cin(s2_c11_0_cout), .sum(s2_c12_0_sum), .carry(s2_c12_0_carry), .cout(s2_c12_0_cout));
  full_adder u_s2_c13_0_fa (.a(pp[6][7]), .b(pp[7][6]), .c(s2_c12_0_cout), .sum(s2_c13_0_sum), .carry(s2_c13_0_carry));

  // Stage 3: the two remaining rows go to the carry-propagate adder.
  product_t row_a, row_b;
  always_comb begin
    row_a[0] = pp[0][0];  row_b[0] = 1'b0;
    row_a[1] = pp[0][1];  row_b[1] = pp[1][0];
    row_a[2] = pp[2][0];  row_b[2] = s2_c2_0_sum;
    row_a[3] = s2_c2_0_carry;  row_b[3] = s2_c3_0_sum;
    row_a[4] = s2_c3_0_carry;  row_b[4] = s2_c4_0_sum;
    row_a[5] = s2_c4_0_carry;  row_b[5] = s2_c5_0_sum;
    row_a[6] = s2_c5_0_carry;  row_b[6] = s2_c6_0_sum;
    row_a[7] = s2_c6_0_carry;  row_b[7] = s2_c7_0_sum;
    row_a[8] = s2_c7_0_carry;  row_b[8] = s2_c8_0_sum;
    row_a[9] = s2_c8_0_carry;  row_b[9] = s2_c9_0_sum;
    row_a[10] = s2_c9_0_carry;  row_b[10] = s2_c10_0_sum;
    row_a[11] = s2_c10_0_carry;  row_b[11] = s2_c11_0_sum;
    row_a[12] = s2_c11_0_carry;  row_b[12] = s2_c12_0_sum;
    row_a[13] = s2_c12_0_carry;  row_b[13] = s2_c13_0_sum;
    row_a[14] = pp[7][7];  row_b[14] = s2_c13_0_carry;
    row_a[15] = 1'b0;  row_b[15] = 1'b0;
  end

  cpa #(.W(PROD_W)) u_cpa (.a(row_a), .b(row_b), .s(p));
endmodule
