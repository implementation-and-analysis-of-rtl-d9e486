// tb_kogge_stone_adder: self-checking test of the Kogge-Stone prefix adder. A 32-bit
// adder gets corner cases (long carry chains, carry-in into all ones) and
// random operands; a 4-bit adder and a 6-bit adder (not a power of two)
// get every operand pair with both carry-in values. Sum and carry-out are
// compared with the test bench's own addition.
module tb_kogge_stone_adder;
  localparam int W = 32;
  logic         clk = 1'b0;
  logic [W-1:0] a, b, s;
  logic         ci, co;
  logic [3:0]   a4, b4, s4;
  logic         ci4, co4;
  logic [5:0]   a6, b6, s6;
  logic         ci6, co6;
  int checks = 0, failures = 0;

  kogge_stone_adder #(.W(W)) dut   (.a(a),  .b(b),  .cin(ci),  .sum(s),  .cout(co));
  kogge_stone_adder #(.W(4)) dut4  (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  kogge_stone_adder #(.W(6)) dut6  (.a(a6), .b(b6), .cin(ci6), .sum(s6), .cout(co6));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [W-1:0] va, input logic [W-1:0] vb, input logic vc);
    logic [W:0] exp;
    @(negedge clk);
    a  = va;
    b  = vb;
    ci = vc;
    @(posedge clk);
    exp = {1'b0, va} + {1'b0, vb} + {{W{1'b0}}, vc};
    checks++;
    if ({co, s} != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h + %b = %b%h expected %h", va, vb, vc, co, s, exp);
    end
  endtask

  initial begin
    a4 = '0; b4 = '0; ci4 = 1'b0;
    a6 = '0; b6 = '0; ci6 = 1'b0;
    check32('0, '0, 1'b0);
    check32('1, '0, 1'b1);
    check32('1, '1, 1'b1);
    check32(32'h7FFF_FFFF, 32'h1, 1'b0);
    check32(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    check32(32'h0000_FFFF, 32'h0000_0001, 1'b0);
    for (int i = 0; i < 20000; i++) check32($urandom, $urandom, 1'($urandom));
    for (int x = 0; x < 64; x++) begin
      for (int y = 0; y < 64; y++) begin
        for (int c = 0; c < 2; c++) begin
          @(negedge clk);
          a6 = 6'(x); b6 = 6'(y); ci6 = 1'(c);
          a4 = 4'(x); b4 = 4'(y); ci4 = 1'(c);
          @(posedge clk);
          checks++;
          if ({co6, s6} != 7'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL W=6 %0d + %0d + %0d = %0d", x, y, c, {co6, s6});
          end
          if (x < 16 && y < 16) begin
            checks++;
            if ({co4, s4} != 5'(x + y + c)) begin
              failures++;
              if (failures < 10) $display("FAIL W=4 %0d + %0d + %0d = %0d", x, y, c, {co4, s4});
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
