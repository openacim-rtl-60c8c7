// tb_edge: edge-detection workload on 16-bit signed PEs (32 x 16 array,
// 16-bit words, SIGNED = 1). A synthetic 32 x 32 grayscale image is filtered
// with the 3 x 3 Sobel kernels and the edge strength sqrt(Gx^2 + Gy^2),
// clipped to 255, is formed; the convolution and the squaring run on the
// PEs, the square root in the testbench. Three PEs run side by side (exact,
// approximate 4-2, logarithmic).
//  * Convolution: the SRAM holds the Gx kernel in words 0-8, the Gy kernel
//    in words 9-17 and zeros after; for every interior pixel its 3 x 3
//    window is streamed twice, then zeros up to 32 words, so the products
//    summed over words 0-8 and 9-17 give Gx and Gy.
//  * Squaring: each PE's own gradients are loaded 32 at a time and the same
//    values are streamed, giving Gx^2 and Gy^2.
// Checks: gradients equal the exact Sobel sums on all three PEs (the kernel
// holds only 0, +-1 and +-2); squares are exact, follow the compensated
// formula (log) or stay within the tree's one-sided bound (approx 4-2); the
// PSNR of the edge image against the exact one is above 40 dB for the
// logarithmic PE and higher still for the approximate 4-2 PE.
module tb_edge;
  import tb_ref_pkg::*;
  import acim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, pe_ce = 0, init_en = 0;
  logic [15:0] din [3];
  always #5 clk = ~clk;

  logic        done [3], valid [3];
  logic [31:0] dout [3];

  for (genvar k = 0; k < 3; k++) begin : g_kind
    localparam mult_kind_e KIND = (k == 0) ? MULT_EXACT : (k == 1) ? MULT_APPROX42 : MULT_LOG;
    pe_macro #(.ROWS(32), .COLS(16), .WORD(16), .MULT_KIND(KIND), .SIGNED(1'b1)) u_pe (
      .CLK(clk), .RST_N(rst_n), .PE_CE(pe_ce), .INIT_ENABLE(init_en), .INIT_DONE(done[k]),
      .DATA_IN(din[k]), .DATA_OUT(dout[k]), .VALID_OUT(valid[k]));
  end

  localparam int SIZE = 32;
  localparam int NPIX = (SIZE - 2) * (SIZE - 2);   // interior pixels
  localparam int NVAL = 2 * NPIX;                  // Gx of pixel i at 2i, Gy at 2i+1
  localparam int NBLK = (NVAL + 31) / 32;
  localparam int KX [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
  localparam int KY [9] = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};

  int      img [SIZE*SIZE];
  int      win [NPIX][9];                          // 3 x 3 window of each interior pixel
  int      gref [NBLK*32];                         // exact gradients
  int      grad [3][NBLK*32];                      // gradients from each PE
  longint  sq [3][NBLK*32];
  real     se_a = 0.0, se_l = 0.0, psnr_a, psnr_l;
  int      x, y, idx, r, p, j, ee, ea, el;
  longint  g, ex;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real psnr(input real se, input int n);
    if (se == 0.0) return 99.0;
    return 10.0 * $log10(255.0 * 255.0 / (se / $itor(n)));
  endfunction

  function automatic int edge_of(input longint gx2, input longint gy2);
    real e = $sqrt($itor(gx2) + $itor(gy2));
    return (e > 255.0) ? 255 : int'($floor(e));
  endfunction

  initial begin
    // image: shaded background, a bright rectangle and a dark disc
    for (int i = 0; i < SIZE * SIZE; i++) begin
      x = i % SIZE; y = i / SIZE;
      img[i] = 40 + 2 * x + y;
      if (x > 5 && x < 20 && y > 4 && y < 14) img[i] = 200;
      if ((x - 20) * (x - 20) + (y - 22) * (y - 22) < 40) img[i] = 15;
    end
    for (int i = 0; i < NBLK * 32; i++) begin
      gref[i] = 0;
      for (int k = 0; k < 3; k++) grad[k][i] = 0;
    end
    for (int q = 0; q < NPIX; q++) begin
      x = 1 + q % (SIZE - 2); y = 1 + q / (SIZE - 2);
      for (int w = 0; w < 9; w++) begin
        win[q][w] = img[(y - 1 + w / 3) * SIZE + x - 1 + w % 3];
        gref[2*q]   += KX[w] * win[q][w];
        gref[2*q+1] += KY[w] * win[q][w];
      end
    end
    #12 rst_n = 1;
    // convolution: load both kernels, then stream 32 words per pixel
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      init_en = 1;
      for (int k = 0; k < 3; k++) din[k] = 16'((i < 9) ? KX[i] : (i < 18) ? KY[i - 9] : 0);
    end
    @(negedge clk);
    init_en = 0;
    @(negedge clk);
    checks++;
    if (!(done[0] && done[1] && done[2])) begin failures++; $display("FAIL INIT_DONE after kernels"); end
    for (int t = 0; t < NPIX * 32 + 2; t++) begin
      @(negedge clk);
      pe_ce = (t < NPIX * 32);
      p = t / 32; j = t % 32;
      for (int k = 0; k < 3; k++) din[k] = (pe_ce && j < 18) ? 16'(win[p][j % 9]) : 16'd0;
      #1;
      if (t >= 2) begin
        r = t - 2; p = r / 32; j = r % 32;
        for (int k = 0; k < 3; k++) begin
          if (j < 9)       grad[k][2*p]   += int'($signed(dout[k]));
          else if (j < 18) grad[k][2*p+1] += int'($signed(dout[k]));
        end
      end
    end
    pe_ce = 0;
    for (int i = 0; i < NVAL; i++) begin
      checks++;
      if (grad[0][i] != gref[i] || grad[1][i] != gref[i] || grad[2][i] != gref[i]) begin
        failures++;
        if (failures < 10) $display("FAIL gradient %0d: exact %0d approx %0d log %0d expected %0d",
                                    i, grad[0][i], grad[1][i], grad[2][i], gref[i]);
      end
    end
    // squaring: each PE squares its own gradients, 32 at a time
    for (int blk = 0; blk < NBLK; blk++) begin
      for (int i = 0; i < 32; i++) begin
        @(negedge clk);
        init_en = 1;
        for (int k = 0; k < 3; k++) din[k] = 16'(grad[k][blk * 32 + i]);
      end
      @(negedge clk);
      init_en = 0;
      @(negedge clk);
      for (int t = 0; t < 34; t++) begin
        @(negedge clk);
        pe_ce = (t < 32);
        for (int k = 0; k < 3; k++) din[k] = (t < 32) ? 16'(grad[k][blk * 32 + t]) : 16'd0;
        #1;
        if (t >= 2) begin
          idx = blk * 32 + t - 2;
          for (int k = 0; k < 3; k++) sq[k][idx] = longint'($signed(dout[k]));
          g  = longint'(gref[idx]);
          if (g < 0) g = -g;
          ex = g * g;
          checks++;
          if (!(valid[0] && valid[1] && valid[2]) || sq[0][idx] != ex ||
              sq[2][idx] != longint'(log_ref(64'(g), 64'(g))) ||
              sq[1][idx] > ex || ex - sq[1][idx] > 7 * 255) begin
            failures++;
            if (failures < 10) $display("FAIL square of %0d: exact %0d approx %0d log %0d",
                                        gref[idx], sq[0][idx], sq[1][idx], sq[2][idx]);
          end
        end
      end
      pe_ce = 0;
    end
    for (int q = 0; q < NPIX; q++) begin
      ee = edge_of(sq[0][2*q], sq[0][2*q+1]);
      ea = edge_of(sq[1][2*q], sq[1][2*q+1]);
      el = edge_of(sq[2][2*q], sq[2][2*q+1]);
      se_a += $itor((ea - ee) * (ea - ee));
      se_l += $itor((el - ee) * (el - ee));
    end
    psnr_a = psnr(se_a, NPIX);
    psnr_l = psnr(se_l, NPIX);
    $display("edge detection %0d pixels: PSNR approx4-2 %.2f dB, log %.2f dB", NPIX, psnr_a, psnr_l);
    checks++;
    if (!(psnr_l > 40.0)) begin failures++; $display("FAIL log PSNR not above 40 dB"); end
    checks++;
    if (!(psnr_a > psnr_l)) begin failures++; $display("FAIL approx4-2 PSNR not above log"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
