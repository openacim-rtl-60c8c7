// tb_pe_signed: the PE in two's-complement mode (SIGNED = 1), 16 x 8 array,
// 8-bit words, with each of the three multipliers. Every signed 8-bit pair
// is multiplied: the 256 possible stored words are loaded 16 at a time and
// each load is streamed all 256 operands (the read address wraps every 16
// products). Checks: the exact PE gives a*b; the logarithmic PE gives the
// compensated formula on the magnitudes with the sign of a*b; the
// approximate 4-2 PE has the sign of a*b and a magnitude at most
// (N/2 - 1) * 255 below |a*b|; VALID_OUT follows PE_CE two cycles later.
module tb_pe_signed;
  import tb_ref_pkg::*;
  import acim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, pe_ce = 0, init_en = 0;
  logic [7:0] din = 0;
  always #5 clk = ~clk;

  logic done [3];
  logic valid [3];
  logic [15:0] dout [3];

  for (genvar k = 0; k < 3; k++) begin : g_kind
    localparam mult_kind_e KIND = (k == 0) ? MULT_EXACT : (k == 1) ? MULT_APPROX42 : MULT_LOG;
    pe_macro #(.MULT_KIND(KIND), .SIGNED(1'b1)) u_pe (
      .CLK(clk), .RST_N(rst_n), .PE_CE(pe_ce), .INIT_ENABLE(init_en), .INIT_DONE(done[k]),
      .DATA_IN(din), .DATA_OUT(dout[k]), .VALID_OUT(valid[k]));
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int a, b, ex, pe, pa, pl, ma, mb, mag, sgn;

  initial begin
    #12 rst_n = 1;
    for (int blk = 0; blk < 16; blk++) begin
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        init_en = 1; din = 8'(blk * 16 + i);
      end
      @(negedge clk);
      init_en = 0;
      @(negedge clk);
      checks++;
      if (!(done[0] && done[1] && done[2])) begin failures++; $display("FAIL INIT_DONE load %0d", blk); end
      for (int t = 0; t < 258; t++) begin
        @(negedge clk);
        pe_ce = (t < 256);
        din   = 8'(t);
        #1;
        if (t >= 2) begin
          a  = int'($signed(8'(t - 2)));
          b  = int'($signed(8'(blk * 16 + (t - 2) % 16)));
          ex = a * b;
          ma = (a < 0) ? -a : a;
          mb = (b < 0) ? -b : b;
          sgn = (ex < 0) ? -1 : 1;
          mag = int'(log_ref(64'(ma), 64'(mb)));
          pe = int'($signed(dout[0])); pa = int'($signed(dout[1])); pl = int'($signed(dout[2]));
          checks++;
          if (!(valid[0] && valid[1] && valid[2]) || pe != ex || pl != sgn * mag ||
              sgn * pa > sgn * ex || sgn * ex - sgn * pa > 3 * 255) begin
            failures++;
            if (failures < 10)
              $display("FAIL %0d*%0d: exact %0d approx %0d log %0d (log expected %0d)",
                       a, b, pe, pa, pl, sgn * mag);
          end
        end
      end
      pe_ce = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
