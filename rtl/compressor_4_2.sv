// 4-2 compressor built from XOR-XNOR cells and 2:1 multiplexers.
// Four bits x1..x4 of one column and a carry-in cin from the column below
// are reduced so that
//     x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
// Structure (two XOR-XNOR cells, four multiplexers):
//   x12  = x1 ^ x2, x34 = x3 ^ x4                 (XOR-XNOR cells)
//   cout = x12 ? x3 : x1                          (depends on x1..x3 only)
//   s1   = x34 ? ~x12 : x12  = x1^x2^x3^x4        (mux on the XOR/XNOR pair)
//   sum  = s1 ? ~cin : cin
//   carry= s1 ? cin  : x4
// The longest path, x -> XOR-XNOR -> s1 mux -> sum/carry mux, passes three
// cells, matching the three-gate-delay critical path given for this cell.
// Because cout does not depend on cin, a row of these compressors chained
// cout -> cin across columns has no rippling carry. The blocks and their
// connections follow the published XOR-XNOR/multiplexer arrangement; which
// input of each multiplexer is the select is this design's reading of it.
// Interface: inputs x1..x4, cin; outputs sum, carry (weight 2), cout
// (weight 2, to the next column's cin). Purely combinational.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic x12, x12n, x34, x34n, s1, cin_n;

  xor_xnor u_xx12 (.a(x1), .b(x2), .x(x12), .xn(x12n));
  xor_xnor u_xx34 (.a(x3), .b(x4), .x(x34), .xn(x34n));

  // x34n is available from the cell but the arrangement only needs x34
  // as a select; tie it off explicitly so the net is visibly unused.
  logic unused_x34n;
  assign unused_x34n = x34n;

  assign cin_n = ~cin;

  mux2 u_mux_cout  (.s(x12), .d0(x1),  .d1(x3),    .y(cout));
  mux2 u_mux_s1    (.s(x34), .d0(x12), .d1(x12n),  .y(s1));
  mux2 u_mux_sum   (.s(s1),  .d0(cin), .d1(cin_n), .y(sum));
  mux2 u_mux_carry (.s(s1),  .d0(x4),  .d1(cin),   .y(carry));
endmodule
