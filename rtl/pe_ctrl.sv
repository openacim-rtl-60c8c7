// pe_ctrl: control logic of the PE macro. It runs the two phases of the PE:
// first initialise the SRAM with DEPTH words, then multiply incoming data by
// the stored words.
//
// Initialisation. A rising INIT_ENABLE (init_enable) while no load is in
// progress starts a new load: it clears init_done and restarts the word
// count at address 0. In every cycle with init_enable high, one DATA_IN word
// is taken into the input buffer (ibuf_load) until DEPTH words have been
// taken; a cycle with init_enable low only pauses the load, and words
// offered after the last one are ignored. Each taken word is written into the SRAM one cycle later,
// at the next address. init_done rises after the write of the last word and
// stays high until the next load starts.
//
// Computation. In a cycle with pe_ce high, init_done high and init_enable
// low, the input buffer takes DATA_IN and the SRAM reads the word at the read
// pointer, which then steps through 0 .. DEPTH-1 and wraps. In the next
// cycle both operands are ready at the multiplier and mult_valid is high, so
// the output buffer captures the product. pe_ce low stalls the stream.
// Initialisation has priority over computation.
//
// Timing: one word per cycle in both phases. A DATA_IN word taken in cycle t
// is written at the end of cycle t+1; a product for cycle t leaves the
// output buffer in cycle t+2. The two phases and the pin names come from the
// document; the sequencing, the address order and the priority are this
// design's choices. Asynchronous active-low reset.
module pe_ctrl #(
  parameter int unsigned DEPTH  = 16,
  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pe_ce,
  input  logic              init_enable,
  output logic              init_done,
  output logic              ibuf_load,
  output logic              sram_ce,
  output logic              sram_we,
  output logic [ADDR_W-1:0] sram_addr,
  output logic              mult_valid
);
  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(DEPTH - 1);

  logic              init_q;    // init_enable one cycle ago
  logic              loading;   // a load is in progress
  logic [ADDR_W-1:0] acc_cnt;   // index of the next word to take
  logic              wr_pend;   // input buffer holds a word to write
  logic [ADDR_W-1:0] wr_addr;
  logic [ADDR_W-1:0] rptr;

  logic              start, accept, compute;
  logic [ADDR_W-1:0] idx;

  always_comb begin
    start     = init_enable & ~init_q & ~loading;
    accept    = init_enable & (start | loading);
    idx       = start ? '0 : acc_cnt;
    compute   = pe_ce & init_done & ~init_enable;
    ibuf_load = accept | compute;
    sram_ce   = wr_pend | compute;
    sram_we   = wr_pend;
    sram_addr = wr_pend ? wr_addr : rptr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_q     <= 1'b0;
      loading    <= 1'b0;
      acc_cnt    <= '0;
      wr_pend    <= 1'b0;
      wr_addr    <= '0;
      rptr       <= '0;
      init_done  <= 1'b0;
      mult_valid <= 1'b0;
    end else begin
      init_q     <= init_enable;
      wr_pend    <= accept;
      mult_valid <= compute;
      if (accept) begin
        wr_addr <= idx;
        acc_cnt <= (idx == LAST) ? '0 : idx + 1'b1;
        loading <= (idx != LAST);
      end
      if (wr_pend && wr_addr == LAST) init_done <= 1'b1;
      if (start) begin
        init_done <= 1'b0;
        rptr      <= '0;
      end else if (compute) begin
        rptr <= (rptr == LAST) ? '0 : rptr + 1'b1;
      end
      // an SRAM write and a compute read never share a cycle
      assert (!(wr_pend && compute)) else $error("pe_ctrl: write and read in the same cycle");
    end
  end

endmodule
