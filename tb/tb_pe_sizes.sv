// tb_pe_sizes: runs the PE macro in the three array / word-width
// configurations of the post-layout comparison (16 x 8 with 8-bit words,
// 32 x 16 with 16-bit words, 64 x 32 with 32-bit words), each with the
// exact, the approximate 4-2 and the logarithmic multiplier: nine PEs fed
// the same random stimulus (operands truncated to each word width). Each PE
// loads its whole array, then multiplies two passes of streamed operands.
// Products are checked against a*b (exact), the compensated logarithmic
// formula (log), and the one-sided bound of the approximate tree
// (0 <= a*b - p <= (N/2 - 1) * 255). It also reports, per configuration,
// the mean relative error of the two approximate multipliers.
module tb_pe_sizes;
  import tb_ref_pkg::*;
  import acim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, pe_ce = 0, init_en = 0;
  logic [31:0] din = 0;
  always #5 clk = ~clk;

  // index: configuration c (0: 8-bit, 1: 16-bit, 2: 32-bit), kind k (0 exact, 1 approx, 2 log)
  logic        done  [3][3];
  logic        valid [3][3];
  logic [63:0] dout  [3][3];

  for (genvar k = 0; k < 3; k++) begin : g_kind
    localparam mult_kind_e KIND = (k == 0) ? MULT_EXACT : (k == 1) ? MULT_APPROX42 : MULT_LOG;
    logic [15:0] d8;
    logic [31:0] d16;
    logic [63:0] d32;
    pe_macro #(.ROWS(16), .COLS(8), .WORD(8), .MULT_KIND(KIND)) u8 (
      .CLK(clk), .RST_N(rst_n), .PE_CE(pe_ce), .INIT_ENABLE(init_en), .INIT_DONE(done[0][k]),
      .DATA_IN(din[7:0]), .DATA_OUT(d8), .VALID_OUT(valid[0][k]));
    pe_macro #(.ROWS(32), .COLS(16), .WORD(16), .MULT_KIND(KIND)) u16 (
      .CLK(clk), .RST_N(rst_n), .PE_CE(pe_ce), .INIT_ENABLE(init_en), .INIT_DONE(done[1][k]),
      .DATA_IN(din[15:0]), .DATA_OUT(d16), .VALID_OUT(valid[1][k]));
    pe_macro #(.ROWS(64), .COLS(32), .WORD(32), .MULT_KIND(KIND)) u32 (
      .CLK(clk), .RST_N(rst_n), .PE_CE(pe_ce), .INIT_ENABLE(init_en), .INIT_DONE(done[2][k]),
      .DATA_IN(din), .DATA_OUT(d32), .VALID_OUT(valid[2][k]));
    assign dout[0][k] = 64'(d8);
    assign dout[1][k] = 64'(d16);
    assign dout[2][k] = d32;
  end

  localparam int DEPTH [3] = '{16, 32, 64};
  localparam int WIDTH [3] = '{8, 16, 32};

  logic [31:0] weights [64];
  logic [31:0] ops [128];
  real  mre [3][2];
  int   nres [3];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned trunc(input logic [31:0] x, input int w);
    return (w == 32) ? longint'(x) : longint'(x & ((32'd1 << w) - 1));
  endfunction

  task automatic check_cfg(input int c, input int idx);
    longint unsigned a, b, ex, lg, pe, pa, pl;
    a  = trunc(ops[idx], WIDTH[c]);
    b  = trunc(weights[idx % DEPTH[c]], WIDTH[c]);
    ex = a * b;
    lg = log_ref(a, b);
    pe = dout[c][0]; pa = dout[c][1]; pl = dout[c][2];
    checks += 3;
    if (pe != ex) begin failures++; $display("FAIL cfg %0d exact %0d*%0d=%0d", c, a, b, pe); end
    if (pl != lg) begin failures++; $display("FAIL cfg %0d log %0d*%0d=%0d exp %0d", c, a, b, pl, lg); end
    if (pa > ex || ex - pa > longint'(WIDTH[c] / 2 - 1) * 255) begin
      failures++; $display("FAIL cfg %0d approx %0d*%0d=%0d", c, a, b, pa);
    end
    if (ex != 0) begin
      mre[c][0] += $itor(ex - pa) / $itor(ex);
      mre[c][1] += ((pl > ex) ? $itor(pl - ex) : $itor(ex - pl)) / $itor(ex);
      nres[c]++;
    end
  endtask

  initial begin
    for (int c = 0; c < 3; c++) begin mre[c][0] = 0.0; mre[c][1] = 0.0; nres[c] = 0; end
    for (int i = 0; i < 64; i++) weights[i] = $urandom >> ($urandom % 8);
    for (int i = 0; i < 128; i++) ops[i] = $urandom >> ($urandom % 8);
    #12 rst_n = 1;
    // load 64 words; the smaller arrays keep the first 16 / 32 and ignore the rest
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      init_en = 1; din = weights[i];
    end
    @(negedge clk);
    init_en = 0;
    @(negedge clk);
    for (int c = 0; c < 3; c++) for (int k = 0; k < 3; k++) begin
      checks++;
      if (!done[c][k]) begin failures++; $display("FAIL INIT_DONE cfg %0d kind %0d", c, k); end
    end
    // stream 128 operands; results appear two cycles later
    for (int t = 0; t < 130; t++) begin
      @(negedge clk);
      pe_ce = (t < 128);
      din   = (t < 128) ? ops[t] : 32'd0;
      #1;
      if (t >= 2) begin
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (!(valid[c][0] && valid[c][1] && valid[c][2])) begin
            failures++; $display("FAIL VALID_OUT cfg %0d cycle %0d", c, t);
          end
          check_cfg(c, t - 2);
        end
      end
    end
    for (int c = 0; c < 3; c++)
      $display("%0d-bit PE (%0d words): mean relative error approx4-2 %e, log %e", WIDTH[c], DEPTH[c],
               mre[c][0] / $itor(nres[c]), mre[c][1] / $itor(nres[c]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
