// tb_wallace_top: end-to-end test of the whole design at its default size
// (16 x 16, both multipliers, both LED displays). Each operand pair is
// held for four clocks while the select line steps through 00..11; both
// products must equal a * b and each LED byte must be the selected byte
// of its product. Operands are the 123 x 123 board example, corner cases
// and random values.
//
// It also counts how often each mechanism of the design was exercised and
// fails if one never was: a 15:4 compressor producing its top output bit
// (a count of 8 or more), a carry travelling through the final adders
// (the two Wallace rows overlapping), every select value, and products
// reaching the top byte.
module tb_wallace_top;
  localparam int N = 16;
  logic           clk = 1'b0;
  logic [N-1:0]   a, b;
  logic [1:0]     sel;
  logic [2*N-1:0] p_ks, p_sk;
  logic [7:0]     led_ks, led_sk;
  int checks = 0, failures = 0;
  int n_c15_top = 0, n_carry = 0, n_top_byte = 0;
  int n_sel [4];

  wallace_top dut (
    .a(a), .b(b), .sel(sel),
    .p_ks(p_ks), .p_sk(p_sk), .led_ks(led_ks), .led_sk(led_sk)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The centre column of the first stage holds 16 bits and feeds a 15:4
  // compressor in both multipliers.
  wire       c15_top  = dut.u_mul_sk.u_tree.g_stage[0].g_col[15].g_c15[0].y[3];
  wire [31:0] row0    = dut.u_mul_ks.u_tree.row0;
  wire [31:0] row1    = dut.u_mul_ks.u_tree.row1;

  task automatic check_one(input logic [N-1:0] va, input logic [N-1:0] vb);
    logic [2*N-1:0] exp;
    logic [7:0]     eb;
    exp = {{N{1'b0}}, va} * {{N{1'b0}}, vb};
    for (int s = 0; s < 4; s++) begin
      @(negedge clk);
      a   = va;
      b   = vb;
      sel = 2'(s);
      @(posedge clk);
      eb = exp[8*(3-s) +: 8];
      checks += 4;
      if (p_ks != exp)  begin failures++; $display("FAIL p_ks %0d * %0d = %0d", va, vb, p_ks); end
      if (p_sk != exp)  begin failures++; $display("FAIL p_sk %0d * %0d = %0d", va, vb, p_sk); end
      if (led_ks != eb) begin failures++; $display("FAIL led_ks sel=%0d %b", s, led_ks); end
      if (led_sk != eb) begin failures++; $display("FAIL led_sk sel=%0d %b", s, led_sk); end
      n_sel[s]++;
    end
    if (c15_top) n_c15_top++;
    if ((row0 & row1) != '0) n_carry++;
    if (exp[31:24] != '0) n_top_byte++;
  endtask

  initial begin
    foreach (n_sel[i]) n_sel[i] = 0;
    check_one(16'd123, 16'd123);
    check_one('0, '0);
    check_one('1, '1);
    check_one(16'hFFFF, 16'h0001);
    for (int i = 0; i < 5000; i++) check_one(N'($urandom), N'($urandom));

    $display("events: 15:4 top bit %0d, final-adder carries %0d, top byte %0d, sel %0d/%0d/%0d/%0d",
             n_c15_top, n_carry, n_top_byte, n_sel[0], n_sel[1], n_sel[2], n_sel[3]);
    checks++;
    if (n_c15_top == 0) begin failures++; $display("FAIL 15:4 top output never set"); end
    checks++;
    if (n_carry == 0) begin failures++; $display("FAIL no carry in the final adder"); end
    checks++;
    if (n_top_byte == 0) begin failures++; $display("FAIL top byte never non-zero"); end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (n_sel[s] == 0) begin failures++; $display("FAIL select %0d never used", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
