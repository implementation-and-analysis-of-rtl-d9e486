// compressor_5_3: a 5:3 counter. Five bits of equal weight w go in; the
// output y is their count (0..5) as a 3-bit number, so y[0] has weight w,
// y[1] weight 2w and y[2] weight 4w.
//
// Structure (the internal gate structure is this design's choice; only
// the function is fixed): a full adder sums x[2:0], a second full adder
// adds its sum to x[4:3], and a half adder merges the two carries of
// weight 2w. Purely combinational, three adder delays deep.
module compressor_5_3 (
  input  logic [4:0] x,
  output logic [2:0] y
);
  logic s1, c1, c2;

  full_adder u_fa0 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s1),   .co(c1));
  full_adder u_fa1 (.a(s1),   .b(x[3]), .ci(x[4]), .s(y[0]), .co(c2));
  half_adder u_ha  (.a(c1),   .b(c2),   .s(y[1]), .c(y[2]));
endmodule
