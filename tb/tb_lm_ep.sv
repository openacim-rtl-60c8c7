// tb_lm_ep: exhaustive test of the EP processing element of the 8-bit
// logarithmic multiplier (qa, qb in 0..127, the range of an 8-bit operand
// without its leading one). Expected: comp = round(max) * min, where round
// goes to the nearest power of two and 1.5*2^k rounds up. It also counts
// how often the larger operand was rounded up and down, and checks the
// worst-case error |qa*qb - comp| against 3*4^(n-3) (n = 8), the bound for
// rounding the larger operand, and that rounding the smaller one instead
// would reach 4^(n-2) - 2^(n-3).
module tb_lm_ep;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0, ups = 0, downs = 0;
  longint unsigned hi, lo, r, err, alt, wce = 0, wce_alt = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  qa, qb;
  logic [15:0] comp;

  lm_ep dut (.qa, .qb, .comp);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      for (int j = 0; j < 128; j++) begin
        qa = 8'(i); qb = 8'(j);
        #1;
        hi = 64'((i > j) ? i : j);
        lo = 64'((i > j) ? j : i);
        r  = round_pow2(hi);
        if (r > hi) ups++;
        else if (hi != 0 && r < hi) downs++;
        checks++;
        err = hi * lo - 64'(comp);
        if (64'(comp) > hi * lo) err = 64'(comp) - hi * lo;
        alt = hi * lo - round_pow2(lo) * hi;
        if (round_pow2(lo) * hi > hi * lo) alt = round_pow2(lo) * hi - hi * lo;
        if (err > wce) wce = err;
        if (alt > wce_alt) wce_alt = alt;
        if (64'(comp) != r * lo) begin
          failures++;
          if (failures < 10) $display("FAIL qa=%0d qb=%0d comp=%0d expected %0d", i, j, comp, r * lo);
        end
      end
    end
    checks++;
    if (ups == 0 || downs == 0) begin
      failures++;
      $display("FAIL rounding directions not both exercised");
    end
    $display("worst-case EP error: %0d (larger rounded), %0d (smaller rounded)", wce, wce_alt);
    checks++;
    if (wce != 3 * 4 ** 5 || wce_alt != 4 ** 6 - 2 ** 5) begin
      failures++;
      $display("FAIL worst-case errors differ from 3*4^5 = 3072 and 4^6 - 2^5 = 4064");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
