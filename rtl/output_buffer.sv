// output_buffer: the PE's output register. On every rising clk edge it
// copies valid_in to valid_out, and when valid_in is high it also captures
// the product; otherwise data_out keeps the last result. Asynchronous
// active-low reset clears both. The document names the buffer and its
// outputs DATA_OUT and VALID_OUT; a single register stage is this design's
// choice. Latency: one cycle.
module output_buffer #(
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_in,
  input  logic [DW-1:0] data_in,
  output logic          valid_out,
  output logic [DW-1:0] data_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      data_out  <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) data_out <= data_in;
    end
  end
endmodule
