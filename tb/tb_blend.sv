// tb_blend: image-blending workload on the default 8-bit PE. Two synthetic
// 32 x 32 grayscale images are blended pixel by pixel by multiplication,
// out = (p1 * p2) >> 8 (the product scaled back to 8 bits). For every block
// of 16 pixels the PE's SRAM is loaded with image 1 and the matching pixels
// of image 2 are streamed through it. Three PEs run side by side (exact,
// approximate 4-2, logarithmic); a stand-alone uncompensated logarithmic
// multiplier (error part dropped) gives the AP-only baseline. Each PE's products are checked
// against its reference, and the peak signal-to-noise ratio against the
// exact result must exceed 30 dB for the logarithmic PE, exceed that of the
// AP-only baseline, and be highest for the approximate 4-2 PE.
module tb_blend;
  import tb_ref_pkg::*;
  import acim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, pe_ce = 0, init_en = 0;
  logic [7:0] din = 0;
  always #5 clk = ~clk;

  logic        done_e, done_a, done_l, v_e, v_a, v_l;
  logic [15:0] d_e, d_a, d_l, p_m;
  logic [7:0]  ma, mb;

  pe_macro #(.MULT_KIND(MULT_EXACT))    u_e (.CLK(clk), .RST_N(rst_n), .PE_CE(pe_ce), .INIT_ENABLE(init_en),
                                             .INIT_DONE(done_e), .DATA_IN(din), .DATA_OUT(d_e), .VALID_OUT(v_e));
  pe_macro #(.MULT_KIND(MULT_APPROX42)) u_a (.CLK(clk), .RST_N(rst_n), .PE_CE(pe_ce), .INIT_ENABLE(init_en),
                                             .INIT_DONE(done_a), .DATA_IN(din), .DATA_OUT(d_a), .VALID_OUT(v_a));
  pe_macro #(.MULT_KIND(MULT_LOG))      u_l (.CLK(clk), .RST_N(rst_n), .PE_CE(pe_ce), .INIT_ENABLE(init_en),
                                             .INIT_DONE(done_l), .DATA_IN(din), .DATA_OUT(d_l), .VALID_OUT(v_l));
  log_mult #(.N(8), .COMPENSATE(1'b0)) u_m (.a(ma), .b(mb), .p(p_m));

  localparam int SIZE = 32;
  logic [7:0] img1 [SIZE*SIZE];
  logic [7:0] img2 [SIZE*SIZE];
  real  se_a = 0.0, se_l = 0.0, se_m = 0.0;
  real  psnr_a, psnr_l, psnr_m;
  int   npix = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real psnr(input real se, input int n);
    if (se == 0.0) return 99.0;
    return 10.0 * $log10(255.0 * 255.0 / (se / $itor(n)));
  endfunction

  initial begin
    int x, y, o1, o2, oe, oa, ol, om;
    // image 1: smooth diagonal gradient with a bright disc; image 2: rings
    for (int i = 0; i < SIZE * SIZE; i++) begin
      x = i % SIZE; y = i / SIZE;
      img1[i] = 8'(20 + 3 * x + 4 * y);
      if ((x - 12) * (x - 12) + (y - 18) * (y - 18) < 60) img1[i] = 8'(230 - x);
      img2[i] = 8'(128 + 100 * $sin(0.05 * $itor((x - 16) * (x - 16) + (y - 16) * (y - 16))));
    end
    #12 rst_n = 1;
    for (int blk = 0; blk < SIZE * SIZE / 16; blk++) begin
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        init_en = 1; din = img1[blk * 16 + i];
      end
      @(negedge clk);
      init_en = 0;
      @(negedge clk);
      for (int t = 0; t < 18; t++) begin
        @(negedge clk);
        pe_ce = (t < 16);
        din   = (t < 16) ? img2[blk * 16 + t] : 8'd0;
        #1;
        if (t >= 2) begin
          o1 = img1[blk * 16 + t - 2];
          o2 = img2[blk * 16 + t - 2];
          ma = 8'(o2); mb = 8'(o1);
          #1;
          checks++;
          if (!(v_e && v_a && v_l) || 32'(d_e) != o1 * o2 || 64'(d_l) != log_ref(o2, o1)) begin
            failures++;
            if (failures < 10) $display("FAIL pixel %0d: %0d*%0d exact %0d log %0d", blk * 16 + t - 2, o2, o1, d_e, d_l);
          end
          oe = 32'(d_e) >> 8; oa = 32'(d_a) >> 8; ol = 32'(d_l) >> 8; om = 32'(p_m) >> 8;
          se_a += $itor((oa - oe) * (oa - oe));
          se_l += $itor((ol - oe) * (ol - oe));
          se_m += $itor((om - oe) * (om - oe));
          npix++;
        end
      end
      pe_ce = 0;
    end
    psnr_a = psnr(se_a, npix);
    psnr_l = psnr(se_l, npix);
    psnr_m = psnr(se_m, npix);
    $display("blending %0d pixels: PSNR approx4-2 %.2f dB, log %.2f dB, AP only %.2f dB", npix, psnr_a, psnr_l, psnr_m);
    checks++;
    if (npix != SIZE * SIZE) begin failures++; $display("FAIL %0d pixels", npix); end
    checks++;
    if (!(psnr_l > 30.0)) begin failures++; $display("FAIL log PSNR below 30 dB"); end
    checks++;
    if (!(psnr_l > psnr_m)) begin failures++; $display("FAIL log PSNR not above AP only"); end
    checks++;
    if (!(psnr_a > psnr_l)) begin failures++; $display("FAIL approx4-2 PSNR not above log"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
