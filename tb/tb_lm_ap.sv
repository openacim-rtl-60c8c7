// tb_lm_ap: exhaustive test of the AP processing element of the 8-bit
// logarithmic multiplier, plus random 16-bit operands. For non-zero operands
// it checks k1/k2 (leading-one positions), qa/qb (operands without their
// leading one), pow = 2^(k1+k2) and ap = qa*2^k2 + qb*2^k1.
module tb_lm_ap;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]  a, b, qa, qb;
  logic [2:0]  k1, k2;
  logic [15:0] pow, ap;
  logic [15:0] a16, b16, qa16, qb16;
  logic [3:0]  k1_16, k2_16;
  logic [31:0] pow16, ap16;

  lm_ap dut (.a, .b, .k1, .k2, .qa, .qb, .pow, .ap);
  lm_ap #(.N(16)) dut16 (.a(a16), .b(b16), .k1(k1_16), .k2(k2_16), .qa(qa16),
                         .qb(qb16), .pow(pow16), .ap(ap16));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint unsigned x, y, got_k1, got_k2, got_qa,
                       got_qb, got_pow, got_ap);
    int ek1, ek2;
    longint unsigned eqa, eqb;
    ek1 = msb(x);
    ek2 = msb(y);
    eqa = x - (64'd1 << ek1);
    eqb = y - (64'd1 << ek2);
    checks++;
    if (got_k1 != longint'(ek1) || got_k2 != longint'(ek2) || got_qa != eqa ||
        got_qb != eqb || got_pow != (64'd1 << (ek1 + ek2)) ||
        got_ap != (eqa << ek2) + (eqb << ek1)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d k1=%0d k2=%0d qa=%0d qb=%0d pow=%0d ap=%0d",
                                  x, y, got_k1, got_k2, got_qa, got_qb, got_pow, got_ap);
    end
  endtask

  initial begin
    for (int i = 1; i < 256; i++) begin
      for (int j = 1; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        check(a, b, k1, k2, qa, qb, pow, ap);
      end
    end
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom) | 16'd1; b16 = 16'($urandom >> (n % 16)) | 16'd1;
      #1;
      check(a16, b16, k1_16, k2_16, qa16, qb16, pow16, ap16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
