// tb_sram_macro: tests the SRAM model in two organisations: the default
// 16 x 8 array with 8-bit words (no column multiplexing, one bank) and a
// 2-bank, 4 x 16 array with 8-bit words (column-mux ratio 2). It fills every
// word with random data, reads everything back in random order and checks
// that RD_OUT holds its value across idle cycles and writes.
module tb_sram_macro;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  // instance A: default
  logic       ce_a, we_a;
  logic [3:0] addr_a;
  logic [7:0] wd_a, rd_a;
  // instance B: ROWS 4, COLS 16, WORD 8, BANKS 2 -> 16 words
  logic       ce_b, we_b;
  logic [3:0] addr_b;
  logic [7:0] wd_b, rd_b;

  sram_macro ua (.CLK(clk), .CE_IN(ce_a), .WE_IN(we_a), .ADDR_IN(addr_a), .WD_IN(wd_a), .RD_OUT(rd_a));
  sram_macro #(.ROWS(4), .COLS(16), .WORD(8), .BANKS(2)) ub (
    .CLK(clk), .CE_IN(ce_b), .WE_IN(we_b), .ADDR_IN(addr_b), .WD_IN(wd_b), .RD_OUT(rd_b));

  logic [7:0] ref_a [16];
  logic [7:0] ref_b [16];
  logic [7:0] last_a, last_b;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input logic [7:0] got, exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %02x expected %02x", what, got, exp_v);
    end
  endtask

  initial begin
    ce_a = 0; we_a = 0; addr_a = 0; wd_a = 0;
    ce_b = 0; we_b = 0; addr_b = 0; wd_b = 0;
    @(negedge clk);
    // fill
    for (int i = 0; i < 16; i++) begin
      ref_a[i] = 8'($urandom);
      ref_b[i] = 8'($urandom);
      ce_a = 1; we_a = 1; addr_a = 4'(i); wd_a = ref_a[i];
      ce_b = 1; we_b = 1; addr_b = 4'(i); wd_b = ref_b[i];
      @(negedge clk);
    end
    // read back in random order, twice
    for (int r = 0; r < 64; r++) begin
      addr_a = 4'($urandom); addr_b = 4'($urandom);
      we_a = 0; we_b = 0; ce_a = 1; ce_b = 1;
      @(negedge clk);
      cmp(rd_a, ref_a[addr_a], "read A");
      cmp(rd_b, ref_b[addr_b], "read B");
      last_a = rd_a; last_b = rd_b;
      // idle cycle with another address: data latches hold
      ce_a = 0; ce_b = 0; addr_a = addr_a + 4'd1; addr_b = addr_b + 4'd1;
      @(negedge clk);
      cmp(rd_a, last_a, "hold A");
      cmp(rd_b, last_b, "hold B");
      // overwrite one word; RD_OUT must not change on a write
      if (r % 4 == 0) begin
        ce_a = 1; we_a = 1; wd_a = 8'($urandom); ref_a[addr_a] = wd_a;
        ce_b = 1; we_b = 1; wd_b = 8'($urandom); ref_b[addr_b] = wd_b;
        @(negedge clk);
        cmp(rd_a, last_a, "hold on write A");
        cmp(rd_b, last_b, "hold on write B");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
