// compressor_15_4: a 15:4 counter. Fifteen bits of equal weight w go in;
// y is their count (0..15), y[k] having weight (2^k)w.
//
// Structure, as in the multiplier's description: a first rank of five
// full adders takes the 15 inputs in groups of three and gives five sum
// bits (weight w) and five carry bits (weight 2w). One 5:3 compressor
// counts the five sums (weights w, 2w, 4w) and a second counts the five
// carries (weights 2w, 4w, 8w). A final half adder / full adder / half
// adder chain adds the two 3-bit counts, the second shifted by one place.
//
// This compressor is exact. The multiplier description calls its 15:4
// compressor approximate but gives no approximate logic, and the products
// it reports are exact, so the exact counter is used here.
//
// The last half adder's carry would have weight 16w; the count never
// exceeds 15, so that carry is always 0 and only its sum is used.
// Purely combinational.
module compressor_15_4 (
  input  logic [14:0] x,
  output logic [3:0]  y
);
  logic [4:0] s, c;     // first rank: sums (weight w), carries (weight 2w)
  logic [2:0] ys, yc;   // counts of s (weights w..4w) and c (weights 2w..8w)
  logic k1, k2;         // carries of the final chain

  for (genvar i = 0; i < 5; i++) begin : g_rank1
    full_adder u_fa (.a(x[3*i]), .b(x[3*i+1]), .ci(x[3*i+2]), .s(s[i]), .co(c[i]));
  end

  compressor_5_3 u_cs (.x(s), .y(ys));
  compressor_5_3 u_cc (.x(c), .y(yc));

  assign y[0] = ys[0];
  half_adder u_ha1 (.a(ys[1]), .b(yc[0]), .s(y[1]), .c(k1));
  full_adder u_fa2 (.a(ys[2]), .b(yc[1]), .ci(k1), .s(y[2]), .co(k2));
  // Weight 8w: yc[2] and k2 are never both 1 (the count is at most 15).
  assign y[3] = yc[2] ^ k2;
endmodule
