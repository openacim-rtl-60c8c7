// tb_cmp42_mult: tests the 4-2 compressor multiplier.
//  * N = 8, exact (APPROX_COLS = 0): all 65536 operand pairs against a*b.
//  * N = 8, approximate (APPROX_COLS = 8, the default): all pairs; each
//    approximate compressor can only lose one unit of its column weight, so
//    the product must never exceed a*b and must lie within
//    (N/2 - 1) * (2^8 - 1) of it, while differing from a*b for some pairs.
//  * N = 16 and N = 32, exact: random pairs against a*b.
//  * widths that are not powers of two (row counts that leave one, two or
//    three rows over a group of four): N = 3, 5, 6, 7 exact, all pairs;
//    N = 12 exact and approximate, random pairs.
module tb_cmp42_mult;
  int checks = 0, failures = 0;
  int unsigned exact, diffs = 0, maxerr = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8;
  logic [15:0] p8e, p8a;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [31:0] a32, b32;
  logic [63:0] p32;

  cmp42_mult #(.N(8), .APPROX_COLS(0)) u_e8  (.a(a8), .b(b8), .p(p8e));
  cmp42_mult                           u_a8  (.a(a8), .b(b8), .p(p8a));
  cmp42_mult #(.N(16), .APPROX_COLS(0)) u_e16 (.a(a16), .b(b16), .p(p16));
  cmp42_mult #(.N(32), .APPROX_COLS(0)) u_e32 (.a(a32), .b(b32), .p(p32));

  logic [2:0]  a3, b3;   logic [5:0]  p3;
  logic [4:0]  a5, b5;   logic [9:0]  p5;
  logic [5:0]  a6, b6;   logic [11:0] p6;
  logic [6:0]  a7, b7;   logic [13:0] p7;
  logic [11:0] a12, b12; logic [23:0] p12e, p12a;
  cmp42_mult #(.N(3),  .APPROX_COLS(0)) u_e3  (.a(a3), .b(b3), .p(p3));
  cmp42_mult #(.N(5),  .APPROX_COLS(0)) u_e5  (.a(a5), .b(b5), .p(p5));
  cmp42_mult #(.N(6),  .APPROX_COLS(0)) u_e6  (.a(a6), .b(b6), .p(p6));
  cmp42_mult #(.N(7),  .APPROX_COLS(0)) u_e7  (.a(a7), .b(b7), .p(p7));
  cmp42_mult #(.N(12), .APPROX_COLS(0)) u_e12 (.a(a12), .b(b12), .p(p12e));
  cmp42_mult #(.N(12))                  u_a12 (.a(a12), .b(b12), .p(p12a));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        exact = i * j;
        checks++;
        if (p8e != 16'(exact)) begin
          failures++;
          if (failures < 10) $display("FAIL exact8 %0d*%0d = %0d", i, j, p8e);
        end
        checks++;
        if (32'(p8a) > exact || exact - 32'(p8a) > 3 * 255) begin
          failures++;
          if (failures < 10) $display("FAIL approx8 %0d*%0d = %0d", i, j, p8a);
        end
        if (32'(p8a) != exact) diffs++;
        if (32'(p8a) <= exact && exact - 32'(p8a) > maxerr) maxerr = exact - 32'(p8a);
      end
    end
    checks++;
    if (diffs == 0) begin
      failures++;
      $display("FAIL approximate multiplier never differs from exact");
    end
    $display("approx8: %0d of 65536 products inexact, max error %0d", diffs, maxerr);
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      a32 = $urandom; b32 = $urandom;
      if (n == 0) begin a16 = '1; b16 = '1; a32 = '1; b32 = '1; end
      #1;
      checks++;
      if (p16 != 32'(a16) * 32'(b16)) begin
        failures++;
        if (failures < 10) $display("FAIL exact16 %0d*%0d = %0d", a16, b16, p16);
      end
      checks++;
      if (p32 != 64'(a32) * 64'(b32)) begin
        failures++;
        if (failures < 10) $display("FAIL exact32 %0d*%0d = %0d", a32, b32, p32);
      end
    end
    for (int i = 0; i < 128; i++) begin
      for (int j = 0; j < 128; j++) begin
        a3 = 3'(i); b3 = 3'(j); a5 = 5'(i); b5 = 5'(j); a6 = 6'(i); b6 = 6'(j);
        a7 = 7'(i); b7 = 7'(j);
        #1;
        checks++;
        if (32'(p7) != i * j || (i < 64 && j < 64 && 32'(p6) != i * j) ||
            (i < 32 && j < 32 && 32'(p5) != i * j) || (i < 8 && j < 8 && 32'(p3) != i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL odd width %0d*%0d: %0d %0d %0d %0d", i, j, p3, p5, p6, p7);
        end
      end
    end
    for (int n = 0; n < 20000; n++) begin
      a12 = 12'($urandom); b12 = 12'($urandom);
      #1;
      exact = 32'(a12) * 32'(b12);
      checks++;
      if (32'(p12e) != exact || 32'(p12a) > exact || exact - 32'(p12a) > 12 * 255) begin
        failures++;
        if (failures < 10) $display("FAIL N=12 %0d*%0d: exact %0d approx %0d", a12, b12, p12e, p12a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
