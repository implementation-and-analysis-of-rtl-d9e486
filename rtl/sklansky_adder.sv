// sklansky_adder: W-bit Sklansky (divide-and-conquer) parallel prefix
// adder, used as the final (carry propagate) stage of the Wallace tree
// multiplier.
//
// Three stages:
//   I    G(i:i) = a(i) AND b(i), P(i:i) = a(i) OR b(i)
//   II   prefixes are built for groups of 2, 4, 8, 16, ... bits: at level
//        l, every bit i in the upper half of a 2^(l+1)-bit block merges
//        with the top bit k of the lower half,
//          P(i:j) = P(i:k+1) AND P(k:j),  G(i:j) = G(i:k+1) OR P(i:k+1) G(k:j)
//        This takes log2(W) levels and only (W/2)log2(W) nodes, but the
//        top bit of each lower half drives the whole upper half (fan-out
//        up to W/2).
//   III  S(i) = (a(i) XOR b(i)) XOR G(i-1:-1), where position -1 is the
//        carry-in.
// An OR propagate is enough here because a generating bit also
// propagates. The carry-in is folded into bit 0 before stage II; cout is
// G(W-1:-1). The structure and the equations follow the multiplier's
// description; the carry-in and carry-out ports are this design's
// addition (the multiplier ties cin to 0). Purely combinational.
module sklansky_adder
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

  gp_t t0 [W];      // level-0 (single bit) generate/propagate pairs

  for (genvar i = 0; i < W; i++) begin : g_pre
    if (i == 0) begin : g_cin
      assign t0[i] = '{g: (a[i] & b[i]) | ((a[i] | b[i]) & cin), p: a[i] | b[i]};
    end else begin : g_bit
      assign t0[i] = '{g: a[i] & b[i], p: a[i] | b[i]};
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
      // Top bit of the lower half of the 2^(l+1)-bit block holding i.
      localparam int K = ((i >> l) << l) - 1;
      if (((i >> l) & 1) == 1) begin : g_black
        assign q[i] = gp_merge(d[i], d[K]);
      end else begin : g_buf
        assign q[i] = d[i];
      end
    end
  end

  for (genvar i = 0; i < W; i++) begin : g_sum
    if (i == 0) begin : g_lsb
      assign sum[i] = (a[i] ^ b[i]) ^ cin;
    end else begin : g_bit
      assign sum[i] = (a[i] ^ b[i]) ^ g_level[L-1].q[i-1].g;
    end
  end

  assign cout = g_level[L-1].q[W-1].g;
endmodule
