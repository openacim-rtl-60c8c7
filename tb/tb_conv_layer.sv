// tb_conv_layer: a scaled-down piece of the CNN-inference workload: one
// 3 x 3 convolution layer with ReLU, in 32-bit signed fixed point (Q16.16),
// on 32-bit signed PEs (64 x 32 array, 32-bit words, SIGNED = 1). The layer
// has 7 input channels of 10 x 10 activations (random, 0 to 4) and 4 output
// channels of 8 x 8 outputs; weights are random in (-0.5, 0.5). For every
// output channel the SRAM holds its 63 weights plus one zero word, and each
// output streams its 63 activations plus a zero, so one output is one pass
// over the array. Products are summed in 64 bits (Q32.32).
// Three PEs run side by side (exact, approximate 4-2, logarithmic).
// Checks: every exact product is a*b; every log product follows the
// compensated formula on the magnitudes; every approximate 4-2 product has
// the sign of a*b and a magnitude at most (N/2 - 1) * 255 below |a*b|; the
// log products err in both directions; the mean relative error of the log
// products lies between 0.5 % and 3 %. The layer outputs' mean relative
// error is reported for both approximate PEs.
module tb_conv_layer;
  import tb_ref_pkg::*;
  import acim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, pe_ce = 0, init_en = 0;
  logic [31:0] din = 0;
  always #5 clk = ~clk;

  logic        done [3], valid [3];
  logic [63:0] dout [3];

  for (genvar k = 0; k < 3; k++) begin : g_kind
    localparam mult_kind_e KIND = (k == 0) ? MULT_EXACT : (k == 1) ? MULT_APPROX42 : MULT_LOG;
    pe_macro #(.ROWS(64), .COLS(32), .WORD(32), .MULT_KIND(KIND), .SIGNED(1'b1)) u_pe (
      .CLK(clk), .RST_N(rst_n), .PE_CE(pe_ce), .INIT_ENABLE(init_en), .INIT_DONE(done[k]),
      .DATA_IN(din), .DATA_OUT(dout[k]), .VALID_OUT(valid[k]));
  end

  localparam int CIN = 7, COUT = 4, IN = 10, OUT = 8, TAPS = 9 * CIN;

  int      act [CIN][IN][IN];
  int      wgt [COUT][64];                          // 63 weights and a zero
  longint  acc [3][COUT][OUT*OUT];
  longint  a, b, ex, mag, sgn, pe, pa, pl;
  int      r, o, j, over = 0, under = 0, nrel = 0, nout = 0;
  real     mre_l = 0.0, out_a = 0.0, out_l = 0.0, y_e, y_a, y_l;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // activation feeding tap j of output o
  function automatic int tap(input int o_idx, input int j_idx);
    int w = j_idx % 9;
    if (j_idx >= TAPS) return 0;
    return act[j_idx / 9][o_idx / OUT + w / 3][o_idx % OUT + w % 3];
  endfunction

  function automatic real relu_q(input longint s);
    return (s > 0) ? $itor(s) / 4294967296.0 : 0.0;  // Q32.32 sum -> real
  endfunction

  initial begin
    for (int c = 0; c < CIN; c++)
      for (int y = 0; y < IN; y++)
        for (int x = 0; x < IN; x++) act[c][y][x] = int'($urandom % (4 << 16));
    for (int f = 0; f < COUT; f++) begin
      for (int t = 0; t < 64; t++) wgt[f][t] = (t < TAPS) ? int'($urandom % 65536) - 32768 : 0;
      for (int i = 0; i < OUT * OUT; i++) for (int k = 0; k < 3; k++) acc[k][f][i] = 0;
    end
    #12 rst_n = 1;
    for (int f = 0; f < COUT; f++) begin
      for (int t = 0; t < 64; t++) begin
        @(negedge clk);
        init_en = 1; din = 32'(wgt[f][t]);
      end
      @(negedge clk);
      init_en = 0;
      @(negedge clk);
      checks++;
      if (!(done[0] && done[1] && done[2])) begin failures++; $display("FAIL INIT_DONE filter %0d", f); end
      for (int t = 0; t < OUT * OUT * 64 + 2; t++) begin
        @(negedge clk);
        pe_ce = (t < OUT * OUT * 64);
        din   = pe_ce ? 32'(tap(t / 64, t % 64)) : 32'd0;
        #1;
        if (t >= 2) begin
          r = t - 2; o = r / 64; j = r % 64;
          a = longint'(tap(o, j)); b = longint'(wgt[f][j]);
          ex = a * b;
          sgn = (ex < 0) ? -1 : 1;
          mag = longint'(log_ref(64'((a < 0) ? -a : a), 64'((b < 0) ? -b : b)));
          pe = longint'(dout[0]); pa = longint'(dout[1]); pl = longint'(dout[2]);
          for (int k = 0; k < 3; k++) acc[k][f][o] += longint'(dout[k]);
          checks++;
          if (!(valid[0] && valid[1] && valid[2]) || pe != ex || pl != sgn * mag ||
              sgn * pa > sgn * ex || sgn * ex - sgn * pa > 15 * 255) begin
            failures++;
            if (failures < 10) $display("FAIL filter %0d output %0d tap %0d: %0d*%0d exact %0d approx %0d log %0d",
                                        f, o, j, a, b, pe, pa, pl);
          end
          if (ex != 0) begin
            if (sgn * pl > sgn * ex) over++;
            if (sgn * pl < sgn * ex) under++;
            mre_l += $itor((pl > ex) ? pl - ex : ex - pl) / $itor(sgn * ex);
            nrel++;
          end
        end
      end
      pe_ce = 0;
    end
    for (int f = 0; f < COUT; f++)
      for (int i = 0; i < OUT * OUT; i++) begin
        y_e = relu_q(acc[0][f][i]); y_a = relu_q(acc[1][f][i]); y_l = relu_q(acc[2][f][i]);
        if (y_e > 0.0) begin
          out_a += ((y_a > y_e) ? y_a - y_e : y_e - y_a) / y_e;
          out_l += ((y_l > y_e) ? y_l - y_e : y_e - y_l) / y_e;
          nout++;
        end
      end
    mre_l = mre_l / $itor(nrel);
    $display("conv layer: log products %0d over, %0d under, mean relative error %e", over, under, mre_l);
    $display("conv layer outputs (%0d positive): mean relative error approx4-2 %e, log %e",
             nout, out_a / $itor(nout), out_l / $itor(nout));
    checks++;
    if (over == 0 || under == 0) begin failures++; $display("FAIL log errors not bidirectional"); end
    checks++;
    if (!(mre_l > 0.005 && mre_l < 0.03)) begin failures++; $display("FAIL log mean relative error out of range"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
