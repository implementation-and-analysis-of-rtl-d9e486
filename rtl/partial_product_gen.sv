// partial_product_gen: first stage of the Wallace tree multiplier. Every
// bit of the multiplicand a is ANDed with every bit of the multiplier b,
// giving N*N partial-product bits (256 for the 16x16 multiplier).
// pp[i][j] = a[j] & b[i] has weight 2^(i+j): row i is a shifted left by i
// places when b[i] is 1. The AND array is the multiplier's first step as
// described; treating the operands as unsigned and keeping the bits as an
// N x N array are this design's choices. Purely combinational.
module partial_product_gen #(
  parameter int N = 16
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = a & {N{b[i]}};
    end
  end
endmodule
