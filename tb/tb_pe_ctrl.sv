// tb_pe_ctrl: tests the PE control logic with DEPTH = 16.
// Phase 1 loads the SRAM with a pause in the middle and INIT_ENABLE held
// past the last word: exactly 16 words must be taken, each written one cycle
// later at addresses 0..15 in order, and init_done must rise right after
// the last write. Phase 2 streams with random PE_CE stalls: every compute
// cycle must read the next address (wrapping at 16) and mult_valid must
// follow one cycle later. Phase 3 starts a second load and checks that it
// clears init_done, restarts at address 0 and blocks computation.
module tb_pe_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, pe_ce = 0, init_enable = 0;
  logic init_done, ibuf_load, sram_ce, sram_we, mult_valid;
  logic [3:0] sram_addr;
  always #5 clk = ~clk;

  pe_ctrl #(.DEPTH(16)) dut (.clk, .rst_n, .pe_ce, .init_enable, .init_done,
                             .ibuf_load, .sram_ce, .sram_we, .sram_addr, .mult_valid);

  int  loads, writes, exp_waddr, exp_raddr, stalls, reads;
  logic prev_load, prev_compute;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // run one init phase: words offered in bursts, held past the end
  task automatic do_init();
    loads = 0; writes = 0; exp_waddr = 0; prev_load = 0;
    for (int c = 0; c < 30; c++) begin
      @(negedge clk);
      init_enable = !(c == 5 || c == 6 || c >= 24);   // pause at 5..6
      pe_ce = init_enable;                            // must be ignored
      #1;
      // a write happens exactly one cycle after each load
      // init_done is high exactly when all 16 writes are behind us
      if (c > 0) expect1(init_done == (writes == 16), "init_done after the last write only");
      expect1(sram_we == prev_load, "write follows load");
      if (sram_we) begin
        expect1(sram_ce && sram_addr == 4'(exp_waddr), "write address order");
        exp_waddr++; writes++;
      end
      expect1(!(sram_ce && !sram_we), "no read during init");
      if (ibuf_load) loads++;
      prev_load = ibuf_load;
    end
    expect1(loads == 16 && writes == 16, "exactly 16 words loaded");
  endtask

  initial begin
    #12 rst_n = 1;
    @(negedge clk);
    expect1(!init_done && !sram_ce && !mult_valid, "reset state");
    do_init();
    // phase 2: stream with stalls
    exp_raddr = 0; stalls = 0; reads = 0; prev_compute = 0;
    init_enable = 0;
    for (int c = 0; c < 60; c++) begin
      @(negedge clk);
      pe_ce = (c % 7 == 3) ? 1'b0 : 1'($urandom % 4 != 0);
      #1;
      expect1(mult_valid == prev_compute, "mult_valid one cycle after read");
      if (pe_ce) begin
        expect1(sram_ce && !sram_we && ibuf_load && sram_addr == 4'(exp_raddr % 16), "read address");
        exp_raddr++; reads++;
      end else begin
        expect1(!sram_ce && !ibuf_load, "stall");
        stalls++;
      end
      prev_compute = pe_ce;
    end
    expect1(stalls > 0 && reads > 16, "stalls and wrap exercised");
    // phase 3: reload
    do_init();
    init_enable = 0;
    @(negedge clk);
    pe_ce = 1;
    #1;
    expect1(sram_ce && !sram_we && sram_addr == 4'd0, "read pointer restarts after reload");
    @(negedge clk);
    pe_ce = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
