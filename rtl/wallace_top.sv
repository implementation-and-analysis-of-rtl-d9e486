// wallace_top: the two Wallace tree multipliers side by side, as they
// are compared: one whose final adder is Kogge-Stone, one whose final
// adder is Sklansky. Both take the same operands a and b and each brings
// out its own 2N-bit product and its own eight-LED byte display, driven
// by a shared 2-bit select line (00 = most significant byte, 11 = least).
//
// Each multiplier on its own, with its a, b and product ports, is the
// 16 x 16 design that was evaluated (64 I/O pins); the LED display is the
// board demonstration. Putting both variants in one top is this design's
// choice, so that both can be simulated and compared together.
// Purely combinational.
module wallace_top
  import wtm_pkg::*;
#(
  parameter int N = 16
) (
  input  logic [N-1:0]                 a,
  input  logic [N-1:0]                 b,
  input  logic [$clog2(2*N/8)-1:0]     sel,
  output logic [2*N-1:0]               p_ks,     // product, Kogge-Stone final adder
  output logic [2*N-1:0]               p_sk,     // product, Sklansky final adder
  output logic [7:0]                   led_ks,   // selected byte of p_ks
  output logic [7:0]                   led_sk    // selected byte of p_sk
);
  wallace_multiplier #(.N(N), .FINAL_ADDER(KOGGE_STONE)) u_mul_ks (
    .a(a), .b(b), .p(p_ks)
  );
  wallace_multiplier #(.N(N), .FINAL_ADDER(SKLANSKY)) u_mul_sk (
    .a(a), .b(b), .p(p_sk)
  );

  led_byte_select #(.PW(2*N)) u_led_ks (.p(p_ks), .sel(sel), .led(led_ks));
  led_byte_select #(.PW(2*N)) u_led_sk (.p(p_sk), .sel(sel), .led(led_sk));
endmodule
