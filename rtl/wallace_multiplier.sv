// wallace_multiplier: N x N unsigned Wallace tree multiplier (16 x 16 ->
// 32 bits by default) with a parallel prefix adder as its final stage.
//
// Three steps, all combinational (no clock; the product follows the
// operands after the logic delay):
//   1. partial_product_gen ANDs every bit of a with every bit of b
//      (N*N bits, 256 for N = 16).
//   2. wallace_reducer compresses those bits, with 15:4 and 5:3
//      compressors, full and half adders, into two 2N-bit rows.
//   3. A 2N-bit prefix adder adds the two rows: Kogge-Stone or Sklansky,
//      chosen by FINAL_ADDER. The adder's carry-out is always 0 (the
//      product fits in 2N bits) and is left unused.
// The two variants compute the same product; they differ only in the
// area and delay of the final adder. Sklansky is the default as the
// smaller and faster of the two on the FPGA the design was evaluated on.
module wallace_multiplier
  import wtm_pkg::*;
#(
  parameter int           N           = 16,
  parameter final_adder_e FINAL_ADDER = SKLANSKY
) (
  input  logic [N-1:0]   a,   // multiplicand
  input  logic [N-1:0]   b,   // multiplier
  output logic [2*N-1:0] p    // product a * b
);
  logic [N-1:0][N-1:0] pp;
  logic [2*N-1:0]      row0, row1;
  logic                cout;  // always 0, see above

  partial_product_gen #(.N(N)) u_ppg (.a(a), .b(b), .pp(pp));

  wallace_reducer #(.N(N)) u_tree (.pp(pp), .row0(row0), .row1(row1));

  if (FINAL_ADDER == KOGGE_STONE) begin : g_ksa
    kogge_stone_adder #(.W(2*N)) u_add (
      .a(row0), .b(row1), .cin(1'b0), .sum(p), .cout(cout)
    );
  end else begin : g_ska
    sklansky_adder #(.W(2*N)) u_add (
      .a(row0), .b(row1), .cin(1'b0), .sum(p), .cout(cout)
    );
  end
endmodule
