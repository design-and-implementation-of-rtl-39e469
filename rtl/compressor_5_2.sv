// 5-2 compressor built from three full adders in series.
// Five bits x1..x5 of one column and two carry-ins cin1, cin2 (the cout1,
// cout2 of the compressor one column lower) are reduced so that
//     x1+x2+x3+x4+x5 + cin1 + cin2 = sum + 2*(carry + cout1 + cout2).
// Chain: FA1(x1,x2,x3) -> carry is cout1, sum goes on;
//        FA2(sum1,x4,cin1) -> carry is cout2, sum goes on;
//        FA3(sum2,x5,cin2) -> carry, sum.
// cout1 depends only on x1..x3 and cout2 not on cin2, so a row of these
// compressors chained across columns does not ripple.
// The three-adder chain and its port names follow the published structure.
// Interface: inputs x1..x5, cin1, cin2; outputs sum, carry, cout1, cout2
// (the last three of weight 2). Purely combinational.
module compressor_5_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic x5,
  input  logic cin1,
  input  logic cin2,
  output logic sum,
  output logic carry,
  output logic cout1,
  output logic cout2
);
  logic s_fa1, s_fa2;

  full_adder u_fa1 (.a(x1),    .b(x2), .c(x3),   .sum(s_fa1), .carry(cout1));
  full_adder u_fa2 (.a(s_fa1), .b(x4), .c(cin1), .sum(s_fa2), .carry(cout2));
  full_adder u_fa3 (.a(s_fa2), .b(x5), .c(cin2), .sum(sum),   .carry(carry));
endmodule
