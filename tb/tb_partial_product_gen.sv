// tb_partial_product_gen: self-checking test of the partial-product AND
// array at N = 16. Corner operands and random operands are applied; every
// partial-product row must equal a shifted-out copy of a gated by one bit
// of b, and the weighted sum of all bits must equal a * b.
module tb_partial_product_gen;
  localparam int N = 16;
  logic                clk = 1'b0;
  logic [N-1:0]        a, b;
  logic [N-1:0][N-1:0] pp;
  int checks = 0, failures = 0;

  partial_product_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [N-1:0] va, input logic [N-1:0] vb);
    logic [2*N-1:0] acc;
    @(negedge clk);
    a = va;
    b = vb;
    @(posedge clk);
    acc = '0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (pp[i] != (vb[i] ? va : '0)) begin
        failures++;
        $display("FAIL a=%h b=%h row %0d = %h", va, vb, i, pp[i]);
      end
      acc += {{N{1'b0}}, pp[i]} << i;
    end
    checks++;
    if (acc != {{N{1'b0}}, va} * {{N{1'b0}}, vb}) begin
      failures++;
      $display("FAIL a=%h b=%h weighted sum %h", va, vb, acc);
    end
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, '1);
    check_one(16'd123, 16'd123);
    check_one(16'hAAAA, 16'h5555);
    for (int i = 0; i < 2000; i++) check_one(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
