// tb_led_byte_select: self-checking test of the LED byte selector. For
// the product of 123 x 123 (0x00003B19) and for random 32-bit values,
// every select value must show the right byte: 00 the most significant,
// 11 the least significant.
module tb_led_byte_select;
  logic        clk = 1'b0;
  logic [31:0] p;
  logic [1:0]  sel;
  logic [7:0]  led;
  int checks = 0, failures = 0;

  led_byte_select #(.PW(32)) dut (.p(p), .sel(sel), .led(led));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [31:0] vp, input logic [1:0] vs, input logic [7:0] exp);
    @(negedge clk);
    p   = vp;
    sel = vs;
    @(posedge clk);
    checks++;
    if (led != exp) begin
      failures++;
      $display("FAIL p=%h sel=%b led=%b expected %b", vp, vs, led, exp);
    end
  endtask

  initial begin
    logic [31:0] r;
    // Board example: 123 x 123 = 15129.
    check_one(32'd15129, 2'b00, 8'b0000_0000);
    check_one(32'd15129, 2'b01, 8'b0000_0000);
    check_one(32'd15129, 2'b10, 8'b0011_1011);
    check_one(32'd15129, 2'b11, 8'b0001_1001);
    for (int i = 0; i < 2000; i++) begin
      r = $urandom;
      check_one(r, 2'b00, r[31:24]);
      check_one(r, 2'b01, r[23:16]);
      check_one(r, 2'b10, r[15:8]);
      check_one(r, 2'b11, r[7:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
