// kogge_stone_adder: W-bit Kogge-Stone parallel prefix adder, used as the
// final (carry propagate) stage of the Wallace tree multiplier.
//
// Three steps:
//   pre-processing  P(i) = a(i) XOR b(i), G(i) = a(i) AND b(i)
//   carry tree      log2(W) levels; at level l every bit i >= 2^l merges
//                   with bit i - 2^l:  G = G | P & G*,  P = P & P*
//                   (bits below 2^l pass unchanged). Every node drives at
//                   most two nodes of the next level (low fan-out), at the
//                   cost of W*log2(W) - W + 1 prefix nodes and long wires.
//   post-processing C(i) = G(i:0), S(i) = P(i) XOR C(i-1)
// The carry-in is folded into bit 0 before the tree (G(0) = G(0) |
// P(0) & cin), so C(i) includes it; cout is C(W-1). The structure and the
// equations follow the multiplier's description; the carry-in and
// carry-out ports are this design's addition (the multiplier ties cin to
// 0). Purely combinational, log2(W) prefix levels deep.
module kogge_stone_adder
  import wtm_pkg::*;
#(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] p;            // half-sum, kept for the sum bits
  gp_t t0 [W];      // level-0 (single bit) generate/propagate pairs

  assign p = a ^ b;

  for (genvar i = 0; i < W; i++) begin : g_pre
    if (i == 0) begin : g_cin
      assign t0[i] = '{g: (a[i] & b[i]) | (p[i] & cin), p: p[i]};
    end else begin : g_bit
      assign t0[i] = '{g: a[i] & b[i], p: p[i]};
    end
  end

  for (genvar l = 0; l < L; l++) begin : g_level
    gp_t d [W];      // input of this level
    gp_t q [W];      // output of this level
    if (l == 0) begin : g_first
      assign d = t0;
    end else begin : g_chain
      assign d = g_level[l-1].q;
    end
    for (genvar i = 0; i < W; i++) begin : g_node
      if (i >= (1 << l)) begin : g_black
        assign q[i] = gp_merge(d[i], d[i - (1 << l)]);
      end else begin : g_buf
        assign q[i] = d[i];
      end
    end
  end

  for (genvar i = 0; i < W; i++) begin : g_sum
    if (i == 0) begin : g_lsb
      assign sum[i] = p[i] ^ cin;
    end else begin : g_bit
      assign sum[i] = p[i] ^ g_level[L-1].q[i-1].g;
    end
  end

  assign cout = g_level[L-1].q[W-1].g;
endmodule
