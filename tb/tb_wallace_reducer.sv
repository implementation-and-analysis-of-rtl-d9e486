// tb_wallace_reducer: self-checking test of the Wallace tree. The test
// bench builds the partial products itself and checks that the two rows
// the tree leaves add up to a * b. It runs a 16-bit tree (corner and
// random operands) and an 8-bit tree (every operand pair).
module tb_wallace_reducer;
  localparam int N  = 16;
  localparam int NS = 8;
  logic                  clk = 1'b0;
  logic [N-1:0]          a, b;
  logic [N-1:0][N-1:0]   pp;
  logic [2*N-1:0]        r0, r1;
  logic [NS-1:0]         as, bs;
  logic [NS-1:0][NS-1:0] pps;
  logic [2*NS-1:0]       s0, s1;
  int checks = 0, failures = 0;

  wallace_reducer #(.N(N))  dut   (.pp(pp),  .row0(r0), .row1(r1));
  wallace_reducer #(.N(NS)) dut_s (.pp(pps), .row0(s0), .row1(s1));

  always_comb for (int i = 0; i < N; i++)  pp[i]  = b[i]  ? a  : '0;
  always_comb for (int i = 0; i < NS; i++) pps[i] = bs[i] ? as : '0;

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
    checks++;
    if (r0 + r1 != exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h rows %h + %h != %h", va, vb, r0, r1, exp);
    end
  endtask

  initial begin
    as = '0;
    bs = '0;
    check16('0, '0);
    check16('1, '1);
    check16(16'd123, 16'd123);
    check16('1, 16'd1);
    for (int i = 0; i < 20000; i++) check16(N'($urandom), N'($urandom));
    for (int x = 0; x < (1 << NS); x++) begin
      for (int y = 0; y < (1 << NS); y++) begin
        if (y % 4 == 0) @(negedge clk);
        as = NS'(x);
        bs = NS'(y);
        #1;
        checks++;
        if (s0 + s1 != (2*NS)'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 a=%0d b=%0d rows %h + %h", x, y, s0, s1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
