// input_buffer: the PE's input register. On a rising clk edge with load high
// it captures data_in; otherwise it holds. The captured word is both the
// write data for the SRAM during initialisation and the incoming operand of
// the multiplier during computation. Asynchronous active-low reset clears it.
// The document names the buffer; a single register stage is this design's
// choice. Latency: data_out shows data_in one cycle after a load.
module input_buffer #(
  parameter int unsigned WORD = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [WORD-1:0] data_in,
  output logic [WORD-1:0] data_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    data_out <= '0;
    else if (load) data_out <= data_in;
  end
endmodule
