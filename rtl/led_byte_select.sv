// led_byte_select: shows a wide product on eight LEDs, one byte at a
// time. The 2-bit select line picks the byte, most significant first:
//   sel = 00 -> p[31:24], 01 -> p[23:16], 10 -> p[15:8], 11 -> p[7:0]
// (for the default 32-bit product). Each LED pin carries its product bit
// unchanged; on the evaluation board the LEDs light when their pin is low,
// so a lit LED reads as 0 and a dark one as 1.
// The select order and the LED polarity follow the board demonstration of
// the multiplier; the width parameter is this design's generalisation.
// Purely combinational.
module led_byte_select #(
  parameter int PW = 32                    // product width, a multiple of 8
) (
  input  logic [PW-1:0]                   p,
  input  logic [$clog2(PW/8)-1:0]         sel,
  output logic [7:0]                      led
);
  localparam int NB = PW / 8;

  always_comb begin
    led = p[8*(NB-1-int'(sel)) +: 8];
  end
endmodule
