// pe_macro: processing element of an SRAM-based digital compute-in-memory
// macro. An SRAM array stores one operand of every multiplication; data
// streamed in on DATA_IN is multiplied, word by word, with the stored words
// by a multiplier placed next to the array, trading exactness for energy
// when an approximate multiplier is chosen.
//
// Blocks: pe_ctrl (control logic), input_buffer, sram_macro, one multiplier
// chosen by MULT_KIND (exact 4-2 compressor tree, approximate 4-2
// compressor tree with approximate compressors in the APPROX_COLS low
// columns, or the logarithmic multiplier with error compensation), and
// output_buffer.
//
// Operation: pulse INIT_ENABLE high and present the DEPTH words to be
// stored on DATA_IN, one per cycle while INIT_ENABLE is high; INIT_DONE
// rises when all are written. Then, in every cycle with PE_CE high, DATA_IN
// is multiplied by the stored word at the next address (0, 1, ...,
// DEPTH-1, 0, ...); DATA_OUT carries the 2*WORD-bit product two cycles
// later with VALID_OUT high. PE_CE low stalls. Operands are unsigned, or
// two's complement when SIGNED = 1: the multiplier then sees the operand
// magnitudes and the product is negated when the signs differ, so every
// multiplier kind serves signed data with the same relative error.
//
// The pin names, the block set and the 16 x 8 array with 8-bit words follow
// the document; the wiring of the input buffer to both the SRAM write port
// and the multiplier, the sequencing and the default multiplier kind
// (logarithmic) are this design's choices. Asynchronous active-low reset
// (the SRAM contents are not reset).
module pe_macro
  import acim_pkg::*;
#(
  parameter int unsigned ROWS        = 16,
  parameter int unsigned COLS        = 8,
  parameter int unsigned WORD        = 8,
  parameter int unsigned BANKS       = 1,
  parameter mult_kind_e  MULT_KIND   = MULT_LOG,
  parameter int unsigned APPROX_COLS = 8,   // approximate columns #0 to #7
  parameter bit          SIGNED      = 1'b0,
  localparam int unsigned DEPTH  = BANKS * ROWS * (COLS / WORD),
  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              CLK,
  input  logic              RST_N,
  input  logic              PE_CE,
  input  logic              INIT_ENABLE,
  output logic              INIT_DONE,
  input  logic [WORD-1:0]   DATA_IN,
  output logic [2*WORD-1:0] DATA_OUT,
  output logic              VALID_OUT
);
  logic              ibuf_load, sram_ce, sram_we, mult_valid;
  logic [ADDR_W-1:0] sram_addr;
  logic [WORD-1:0]   operand, stored;
  logic [WORD-1:0]   mag_a, mag_b;
  logic [2*WORD-1:0] product, mag_p;

  pe_ctrl #(.DEPTH(DEPTH)) u_ctrl (
    .clk        (CLK),
    .rst_n      (RST_N),
    .pe_ce      (PE_CE),
    .init_enable(INIT_ENABLE),
    .init_done  (INIT_DONE),
    .ibuf_load  (ibuf_load),
    .sram_ce    (sram_ce),
    .sram_we    (sram_we),
    .sram_addr  (sram_addr),
    .mult_valid (mult_valid)
  );

  input_buffer #(.WORD(WORD)) u_ibuf (
    .clk(CLK), .rst_n(RST_N), .load(ibuf_load), .data_in(DATA_IN), .data_out(operand)
  );

  sram_macro #(.ROWS(ROWS), .COLS(COLS), .WORD(WORD), .BANKS(BANKS)) u_sram (
    .CLK(CLK), .CE_IN(sram_ce), .WE_IN(sram_we), .ADDR_IN(sram_addr),
    .WD_IN(operand), .RD_OUT(stored)
  );

  if (MULT_KIND == MULT_LOG) begin : g_log
    log_mult #(.N(WORD)) u_mult (.a(mag_a), .b(mag_b), .p(mag_p));
  end else if (MULT_KIND == MULT_APPROX42) begin : g_apx
    cmp42_mult #(.N(WORD), .APPROX_COLS(APPROX_COLS)) u_mult (.a(mag_a), .b(mag_b), .p(mag_p));
  end else begin : g_exact
    cmp42_mult #(.N(WORD), .APPROX_COLS(0)) u_mult (.a(mag_a), .b(mag_b), .p(mag_p));
  end

  // sign-magnitude handling; -2^(WORD-1) has magnitude 2^(WORD-1), which
  // still fits the unsigned WORD-bit multiplier input
  if (SIGNED) begin : g_signed
    logic neg;
    assign neg     = operand[WORD-1] ^ stored[WORD-1];
    assign mag_a   = operand[WORD-1] ? -operand : operand;
    assign mag_b   = stored[WORD-1]  ? -stored  : stored;
    assign product = neg ? -mag_p : mag_p;
  end else begin : g_unsigned
    assign mag_a   = operand;
    assign mag_b   = stored;
    assign product = mag_p;
  end

  output_buffer #(.DW(2*WORD)) u_obuf (
    .clk(CLK), .rst_n(RST_N), .valid_in(mult_valid), .data_in(product),
    .valid_out(VALID_OUT), .data_out(DATA_OUT)
  );
endmodule
