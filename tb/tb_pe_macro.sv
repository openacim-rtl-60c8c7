// tb_pe_macro: end-to-end test of the PE macro. Three PEs of the default
// size (16 x 8 SRAM, 8-bit words) share one stimulus and differ only in the
// multiplier: logarithmic (the default), approximate 4-2 and exact 4-2.
// The test loads the SRAM (with a pause and with INIT_ENABLE held past the
// last word), streams operands with random PE_CE stalls over more than one
// pass through the array, reloads new data and streams again.
// Every product is compared with a reference computed here: a*b for the
// exact PE, the compensated logarithmic formula for the log PE, and for the
// approximate PE a one-sided bound (never above a*b, at most 765 below).
// Each result must appear exactly two cycles after its operand.
// Mechanisms counted (each must occur): load pause, ignored extra word,
// stall, address wrap, reload, inexact approximate product, inexact log
// product, compensation rounding the larger operand up and down.
module tb_pe_macro;
  import tb_ref_pkg::*;
  import acim_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, pe_ce = 0, init_en = 0;
  logic [7:0] din = 0;
  always #5 clk = ~clk;

  logic        done_l, done_a, done_e, vl, va, ve;
  logic [15:0] dl, da, de;

  pe_macro                              u_log (.CLK(clk), .RST_N(rst_n), .PE_CE(pe_ce), .INIT_ENABLE(init_en),
                                               .INIT_DONE(done_l), .DATA_IN(din), .DATA_OUT(dl), .VALID_OUT(vl));
  pe_macro #(.MULT_KIND(MULT_APPROX42)) u_apx (.CLK(clk), .RST_N(rst_n), .PE_CE(pe_ce), .INIT_ENABLE(init_en),
                                               .INIT_DONE(done_a), .DATA_IN(din), .DATA_OUT(da), .VALID_OUT(va));
  pe_macro #(.MULT_KIND(MULT_EXACT))    u_exa (.CLK(clk), .RST_N(rst_n), .PE_CE(pe_ce), .INIT_ENABLE(init_en),
                                               .INIT_DONE(done_e), .DATA_IN(din), .DATA_OUT(de), .VALID_OUT(ve));

  logic [7:0] weights [16];
  int  n_pause, n_extra, n_stall, n_wrap, n_reload, n_apx_inexact, n_log_inexact, n_round_up, n_round_dn;
  int  n_results;
  // pipeline of expected operands: issued in cycle t, due in cycle t+2
  logic       pv [3];
  logic [7:0] pa [3], pb [3];
  int         rptr;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect1(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // checks outputs against the operands issued two cycles earlier
  task automatic check_outputs();
    longint unsigned ex, lg, qa, qb, hi;
    expect1(vl == pv[2] && va == pv[2] && ve == pv[2], "VALID_OUT two cycles after PE_CE");
    if (pv[2]) begin
      n_results++;
      ex = longint'(pa[2]) * longint'(pb[2]);
      lg = log_ref(pa[2], pb[2]);
      expect1(64'(de) == ex, "exact product");
      expect1(64'(dl) == lg, "log product");
      expect1(64'(da) <= ex && ex - 64'(da) <= 765, "approximate product bound");
      if (64'(da) != ex) n_apx_inexact++;
      if (64'(dl) != ex) n_log_inexact++;
      if (pa[2] != 0 && pb[2] != 0) begin
        qa = pa[2] - (64'd1 << msb(pa[2]));
        qb = pb[2] - (64'd1 << msb(pb[2]));
        hi = (qa > qb) ? qa : qb;
        if (round_pow2(hi) > hi) n_round_up++;
        else if (hi != 0 && round_pow2(hi) < hi) n_round_dn++;
      end
    end
  endtask

  // one clock cycle: set inputs at the falling edge, check just after
  task automatic cycle(input logic ce, input logic ie, input logic [7:0] d);
    @(negedge clk);
    pe_ce = ce; init_en = ie; din = d;
    #1;
    pv[2] = pv[1]; pa[2] = pa[1]; pb[2] = pb[1];
    pv[1] = pv[0]; pa[1] = pa[0]; pb[1] = pb[0];
    pv[0] = ce && done_e && !ie;
    pa[0] = d; pb[0] = weights[rptr];
    if (pv[0]) begin
      rptr = (rptr + 1) % 16;
      if (rptr == 0) n_wrap++;
    end
    check_outputs();
  endtask

  task automatic load(input bit with_pause);
    int i = 0, c = 0;
    while (i < 16) begin
      if (with_pause && c == 6) begin
        cycle(0, 0, 8'($urandom));
        cycle(0, 0, 8'($urandom));
        n_pause++;
      end
      weights[i] = (i < 2) ? 8'(255 - i) : 8'($urandom);
      cycle(0, 1, weights[i]);
      i++; c++;
    end
    cycle(0, 1, 8'hA5);   // extra word: must be ignored
    n_extra++;
    cycle(0, 0, 8'h00);
    cycle(0, 0, 8'h00);
    expect1(done_l && done_a && done_e, "INIT_DONE after load");
    rptr = 0;
  endtask

  task automatic stream(input int n);
    logic ce;
    for (int k = 0; k < n; k++) begin
      ce = ($urandom % 5 != 0);
      if (!ce) n_stall++;
      cycle(ce, 0, (k < 2) ? 8'(k + 254) : 8'($urandom));
    end
    cycle(0, 0, 0);
    cycle(0, 0, 0);
    cycle(0, 0, 0);
  endtask

  initial begin
    for (int s = 0; s < 3; s++) begin pv[s] = 0; pa[s] = 0; pb[s] = 0; end
    rptr = 0;
    #12 rst_n = 1;
    cycle(0, 0, 0);
    expect1(!done_l && !vl, "reset state");
    cycle(1, 0, 8'd7);            // PE_CE before any load: no output
    load(1);
    stream(80);
    load(0);
    n_reload++;
    stream(60);
    $display("results=%0d pause=%0d extra=%0d stall=%0d wrap=%0d reload=%0d apx_inexact=%0d log_inexact=%0d round_up=%0d round_down=%0d",
             n_results, n_pause, n_extra, n_stall, n_wrap, n_reload, n_apx_inexact, n_log_inexact, n_round_up, n_round_dn);
    expect1(n_pause > 0, "load pause happened");
    expect1(n_extra > 0, "extra word offered");
    expect1(n_stall > 0, "stall happened");
    expect1(n_wrap > 0, "address wrap happened");
    expect1(n_reload > 0, "reload happened");
    expect1(n_apx_inexact > 0, "approximate product inexact at least once");
    expect1(n_log_inexact > 0, "log product inexact at least once");
    expect1(n_round_up > 0 && n_round_dn > 0, "compensation rounding both ways");
    expect1(n_results > 100, "enough results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
