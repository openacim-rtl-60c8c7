// tb_cmp42_approx: exhaustive test of the approximate 4-2 compressor.
// Expected 2*c + s: the number of ones among x1..x4, saturated at 3.
module tb_cmp42_approx;
  int checks = 0, failures = 0, errs = 0;
  int cnt, exp_v;
  logic x1, x2, x3, x4, c, s;
  logic clk = 0;
  always #5 clk = ~clk;

  cmp42_approx dut (.x1, .x2, .x3, .x4, .c, .s);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x1, x2, x3, x4} = 4'(v);
      #1;
      cnt   = 32'(x1) + x2 + x3 + x4;
      exp_v = (cnt > 3) ? 3 : cnt;
      checks++;
      if (2 * 32'(c) + 32'(s) != exp_v) begin
        failures++;
        $display("FAIL in=%04b c=%b s=%b expected %0d", v[3:0], c, s, exp_v);
      end
      if (2 * 32'(c) + 32'(s) != cnt) errs++;
    end
    // exactly one erroneous pattern out of 16
    checks++;
    if (errs != 1) begin
      failures++;
      $display("FAIL %0d erroneous patterns", errs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
