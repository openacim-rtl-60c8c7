// tb_pe_macro_full: one complete operation of the PE macro at its default
// configuration (16 x 8 SRAM, 8-bit words, logarithmic multiplier): load all
// 16 words, then multiply 48 streamed operands (three passes through the
// array) without stalls, checking every product against the compensated
// logarithmic formula, the two-cycle latency and one result per cycle.
module tb_pe_macro_full;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, pe_ce = 0, init_en = 0;
  logic [7:0]  din = 0;
  logic        done, vout;
  logic [15:0] dout;
  always #5 clk = ~clk;

  pe_macro dut (.CLK(clk), .RST_N(rst_n), .PE_CE(pe_ce), .INIT_ENABLE(init_en),
                .INIT_DONE(done), .DATA_IN(din), .DATA_OUT(dout), .VALID_OUT(vout));

  logic [7:0] weights [16];
  logic [7:0] ops [48];
  int first_valid, last_valid, n_valid;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) weights[i] = 8'($urandom);
    for (int i = 0; i < 48; i++) ops[i] = 8'($urandom);
    n_valid = 0;
    #12 rst_n = 1;
    // load
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      init_en = 1; din = weights[i];
    end
    @(negedge clk);
    init_en = 0;
    @(negedge clk);
    checks++;
    if (!done) begin failures++; $display("FAIL INIT_DONE not set"); end
    // stream: operand k issued in cycle k, due in cycle k+2
    for (int c = 0; c < 48 + 3; c++) begin
      @(negedge clk);
      pe_ce = (c < 48);
      din   = (c < 48) ? ops[c] : 8'd0;
      #1;
      checks++;
      if (vout != (c >= 2 && c < 50)) begin
        failures++;
        $display("FAIL VALID_OUT=%b in cycle %0d", vout, c);
      end
      if (vout) begin
        if (n_valid == 0) first_valid = c;
        last_valid = c;
        checks++;
        if (64'(dout) != log_ref(ops[c-2], weights[(c-2) % 16])) begin
          failures++;
          $display("FAIL product %0d: %0d*%0d gave %0d expected %0d", c - 2, ops[c-2],
                   weights[(c-2) % 16], dout, log_ref(ops[c-2], weights[(c-2) % 16]));
        end
        n_valid++;
      end
    end
    checks++;
    if (n_valid != 48 || first_valid != 2 || last_valid - first_valid != 47) begin
      failures++;
      $display("FAIL throughput: %0d results from cycle %0d to %0d", n_valid, first_valid, last_valid);
    end
    $display("48 products in %0d cycles, latency 2", last_valid + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
