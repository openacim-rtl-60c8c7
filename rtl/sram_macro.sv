// sram_macro: synchronous single-port SRAM with a FakeRAM-style interface
// (CLK, CE_IN, WE_IN, ADDR_IN, WD_IN, RD_OUT), organised as BANKS banks of
// ROWS x COLS bit cells. Each row holds MUX = COLS / WORD words, interleaved
// bit by bit across the columns as a column multiplexer sees them: bit j of
// the word in column group m sits in column j*MUX + m.
//
// The address splits, from least to most significant, into the column-mux
// select, the row and the bank. A row decoder drives a one-hot word line, the
// selected row is read out and the column multiplexer picks one word from it.
// On a rising CLK edge with CE_IN high, WE_IN high writes WD_IN into the
// addressed word; WE_IN low loads the addressed word into the data latches,
// so RD_OUT carries it from that edge on and holds it until the next read.
// With CE_IN low nothing changes. The contents are not reset.
//
// This is a logical model of the macro. The precharge, sense amplifiers,
// word-line drivers, replica-bitline timing and tri-state data drivers of the
// real 6T macro are circuits with no logic function of their own and are not
// modelled; their net effect is the one-cycle read above. The port names, the
// knobs (rows, columns, word width, banks, column-mux ratio) and the default
// 16 x 8 array with 8-bit words come from the document; the address split and
// bit interleaving are this design's choices.
module sram_macro #(
  parameter int unsigned ROWS  = 16,
  parameter int unsigned COLS  = 8,
  parameter int unsigned WORD  = 8,
  parameter int unsigned BANKS = 1,
  localparam int unsigned MUX    = COLS / WORD,
  localparam int unsigned DEPTH  = BANKS * ROWS * MUX,
  localparam int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              CLK,
  input  logic              CE_IN,
  input  logic              WE_IN,
  input  logic [ADDR_W-1:0] ADDR_IN,
  input  logic [WORD-1:0]   WD_IN,
  output logic [WORD-1:0]   RD_OUT
);
  if (COLS % WORD != 0 || COLS < WORD) begin : g_bad_cols
    $error("sram_macro: COLS must be a multiple of WORD");
  end

  // bit-cell core
  logic [COLS-1:0] cells [BANKS][ROWS];

  int unsigned      bank_sel, row_sel, col_sel;
  logic [ROWS-1:0]  wl;       // one-hot word line of the selected bank
  logic [COLS-1:0]  row_data;
  logic [WORD-1:0]  rd_word;

  always_comb begin
    col_sel  = 32'(ADDR_IN) % MUX;
    row_sel  = (32'(ADDR_IN) / MUX) % ROWS;
    bank_sel = 32'(ADDR_IN) / (MUX * ROWS);
    if (bank_sel >= BANKS) bank_sel = BANKS - 1;
    // row decoder
    for (int r = 0; r < ROWS; r++) wl[r] = (row_sel == r);
    // selected row onto the bit lines
    row_data = '0;
    for (int r = 0; r < ROWS; r++) begin
      if (wl[r]) row_data = row_data | cells[bank_sel][r];
    end
    // column multiplexer
    for (int j = 0; j < WORD; j++) rd_word[j] = row_data[j*MUX + col_sel];
  end

  always_ff @(posedge CLK) begin
    if (CE_IN) begin
      if (WE_IN) begin
        for (int j = 0; j < WORD; j++) cells[bank_sel][row_sel][j*MUX + col_sel] <= WD_IN[j];
      end else begin
        RD_OUT <= rd_word;  // data latches
      end
    end
  end
endmodule
