// tb_wallace_multiplier: self-checking test of the Wallace tree
// multiplier with each final adder. Two 16 x 16 instances (Kogge-Stone
// and Sklansky) get corner operands, the 123 x 123 example and random
// operands; two 8 x 8 instances get every operand pair. Every product is
// compared with the test bench's own multiplication.
module tb_wallace_multiplier;
  import wtm_pkg::*;
  localparam int N  = 16;
  localparam int NS = 8;
  logic            clk = 1'b0;
  logic [N-1:0]    a, b;
  logic [2*N-1:0]  p_ks, p_sk;
  logic [NS-1:0]   as, bs;
  logic [2*NS-1:0] q_ks, q_sk;
  int checks = 0, failures = 0;

  wallace_multiplier #(.N(N),  .FINAL_ADDER(KOGGE_STONE)) dut_ks  (.a(a),  .b(b),  .p(p_ks));
  wallace_multiplier #(.N(N),  .FINAL_ADDER(SKLANSKY))    dut_sk  (.a(a),  .b(b),  .p(p_sk));
  wallace_multiplier #(.N(NS), .FINAL_ADDER(KOGGE_STONE)) dut_ks8 (.a(as), .b(bs), .p(q_ks));
  wallace_multiplier #(.N(NS), .FINAL_ADDER(SKLANSKY))    dut_sk8 (.a(as), .b(bs), .p(q_sk));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [N-1:0] va, input logic [N-1:0] vb);
    logic [2*N-1:0] exp;
    @(negedge clk);
    a = va;
    b = vb;
    @(posedge clk);
    exp = {{N{1'b0}}, va} * {{N{1'b0}}, vb};
    checks += 2;
    if (p_ks != exp) begin
      failures++;
      if (failures < 10) $display("FAIL KS %0d * %0d = %0d expected %0d", va, vb, p_ks, exp);
    end
    if (p_sk != exp) begin
      failures++;
      if (failures < 10) $display("FAIL SK %0d * %0d = %0d expected %0d", va, vb, p_sk, exp);
    end
  endtask

  initial begin
    as = '0;
    bs = '0;
    check16(16'd123, 16'd123);     // 15129 = 0x3B19
    check16('0, '0);
    check16('1, '1);
    check16('1, 16'd1);
    check16(16'h8000, 16'h8000);
    for (int i = 0; i < 20000; i++) check16(N'($urandom), N'($urandom));
    for (int x = 0; x < (1 << NS); x++) begin
      for (int y = 0; y < (1 << NS); y++) begin
        if (y % 4 == 0) @(negedge clk);
        as = NS'(x);
        bs = NS'(y);
        #1;
        checks += 2;
        if (q_ks != (2*NS)'(x * y) || q_sk != (2*NS)'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 %0d * %0d = %0d / %0d", x, y, q_ks, q_sk);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
