// tb_compressor_15_4: exhaustive self-checking test of the 15:4 counter.
// All 32768 input patterns are applied, one per clock; the 4-bit output
// must equal the number of ones in the input. A watchdog ends the run with
// a failure if it does not finish in time.
module tb_compressor_15_4;
  logic        clk = 1'b0;
  logic [14:0] x;
  logic [3:0]  y;
  int checks = 0, failures = 0;
  int hist [16];

  compressor_15_4 dut (.x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[i]) hist[i] = 0;
    for (int v = 0; v < (1 << 15); v++) begin
      @(negedge clk);
      x = 15'(v);
      @(posedge clk);
      checks++;
      hist[$countones(x)]++;
      if (int'(y) != $countones(x)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%b y=%0d expected %0d", x, y, $countones(x));
      end
    end
    // Every count 0..15 must have been produced.
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (hist[i] == 0) begin
        failures++;
        $display("FAIL count %0d never seen", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
