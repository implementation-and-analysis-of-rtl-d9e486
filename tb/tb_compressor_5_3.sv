// tb_compressor_5_3: exhaustive self-checking test of the 5:3 counter.
// All 32 input patterns are applied, one per clock; the output must equal
// the number of ones in the input. A watchdog ends the run with a failure
// if it does not finish in time.
module tb_compressor_5_3;
  logic       clk = 1'b0;
  logic [4:0] x;
  logic [2:0] y;
  int checks = 0, failures = 0;

  compressor_5_3 dut (.x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      @(negedge clk);
      x = 5'(v);
      @(posedge clk);
      checks++;
      if (int'(y) != $countones(x)) begin
        failures++;
        $display("FAIL x=%b y=%0d expected %0d", x, y, $countones(x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
