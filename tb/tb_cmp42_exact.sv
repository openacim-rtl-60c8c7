// tb_cmp42_exact: exhaustive test of the exact 4-2 compressor. For all 32
// input patterns it checks x1+x2+x3+x4+cin == s + 2*(c + cout) and that cout
// does not depend on cin.
module tb_cmp42_exact;
  int checks = 0, failures = 0;
  logic x1, x2, x3, x4, cin, s, c, cout, cout0;
  logic clk = 0;
  always #5 clk = ~clk;

  cmp42_exact dut (.x1, .x2, .x3, .x4, .cin, .s, .c, .cout);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      checks++;
      if (32'(x1) + x2 + x3 + x4 + cin != 32'(s) + 2 * (32'(c) + cout)) begin
        failures++;
        $display("FAIL in=%05b s=%b c=%b cout=%b", v[4:0], s, c, cout);
      end
      if (!cin) cout0 = cout;
      else begin
        checks++;
        if (cout != cout0) begin
          failures++;
          $display("FAIL cout depends on cin, in=%05b", v[4:0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
