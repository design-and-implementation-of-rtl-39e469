// Partial-product generator, the first of the multiplier's three stages.
// Row i of the matrix is the multiplicand m gated by multiplier bit n[i]:
//     pp[i][j] = m[j] & n[i], of weight 2^(i+j).
// The reduction tree regroups these bits by column.
// Interface: operands m, n (N bits, unsigned); output pp[N][N]. Combinational.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] m,
  input  logic [N-1:0] n,
  output logic [N-1:0] pp [N]
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = m & {N{n[i]}};
    end
  end
endmodule
