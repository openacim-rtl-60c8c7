// tb_log_mult: tests the compensated logarithmic multiplier.
//  * N = 8: all 65536 operand pairs against the reference
//    2^(k1+k2) + round(max(qa,qb))*min(qa,qb) + qa*2^k2 + qb*2^k1
//    (zero when an operand is zero). It also checks that the compensation
//    term never overlaps 2^(k1+k2), so that an OR may replace the adder, and
//    reports the mean relative error against a*b, which must be below that
//    of the uncompensated (AP-only) product.
//  * N = 8 without compensation against the AP-only reference.
//  * N = 16 and N = 32: random pairs against the reference.
module tb_log_mult;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  real red_c = 0.0, red_m = 0.0, rel;
  int  nz = 0;
  longint unsigned e, em, ex, qa, qb, hi, lo;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8;
  logic [15:0] p8, p8m;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [31:0] a32, b32;
  logic [63:0] p32;

  log_mult                             u8   (.a(a8), .b(b8), .p(p8));
  log_mult #(.N(8), .COMPENSATE(1'b0)) u8m  (.a(a8), .b(b8), .p(p8m));
  log_mult #(.N(16))                   u16  (.a(a16), .b(b16), .p(p16));
  log_mult #(.N(32))                   u32  (.a(a32), .b(b32), .p(p32));

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
        e  = log_ref(i, j);
        em = log_ref(i, j, 1'b0);
        checks++;
        if (64'(p8) != e) begin
          failures++;
          if (failures < 10) $display("FAIL log8 %0d*%0d = %0d expected %0d", i, j, p8, e);
        end
        checks++;
        if (64'(p8m) != em) begin
          failures++;
          if (failures < 10) $display("FAIL aponly8 %0d*%0d = %0d expected %0d", i, j, p8m, em);
        end
        if (i != 0 && j != 0) begin
          qa = i - (64'd1 << msb(i));
          qb = j - (64'd1 << msb(j));
          hi = (qa > qb) ? qa : qb;
          lo = (qa > qb) ? qb : qa;
          checks++;
          if (round_pow2(hi) * lo >= (64'd1 << (msb(i) + msb(j)))) begin
            failures++;
            $display("FAIL compensation overlaps 2^(k1+k2) for %0d*%0d", i, j);
          end
          ex = i * j;
          rel = ($itor(p8) - $itor(ex)) / $itor(ex);
          red_c += (rel < 0.0) ? -rel : rel;
          rel = ($itor(ex) - $itor(p8m)) / $itor(ex);
          red_m += (rel < 0.0) ? -rel : rel;
          nz++;
        end
      end
    end
    red_c = red_c / $itor(nz);
    red_m = red_m / $itor(nz);
    $display("mean relative error: compensated %f, uncompensated %f", red_c, red_m);
    checks++;
    if (!(red_c < red_m)) begin
      failures++;
      $display("FAIL compensation does not reduce the error");
    end
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom >> (n % 16)); b16 = 16'($urandom);
      a32 = $urandom >> (n % 32); b32 = $urandom;
      if (n == 0) begin a16 = '1; b16 = '1; a32 = '1; b32 = '1; end
      #1;
      checks++;
      if (64'(p16) != log_ref(a16, b16)) begin
        failures++;
        if (failures < 10) $display("FAIL log16 %0d*%0d = %0d", a16, b16, p16);
      end
      checks++;
      if (p32 != log_ref(a32, b32)) begin
        failures++;
        if (failures < 10) $display("FAIL log32 %0d*%0d = %0d", a32, b32, p32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
