// tb_output_buffer: checks reset, one-cycle valid pipeline and that the data
// register keeps the last valid result.
module tb_output_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, vin = 0, vout;
  logic [15:0] din = 0, dout, expv;
  logic        expvld;
  always #5 clk = ~clk;

  output_buffer dut (.clk, .rst_n, .valid_in(vin), .data_in(din), .valid_out(vout), .data_out(dout));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (vout !== 1'b0 || dout !== 16'd0) begin failures++; $display("FAIL reset"); end
    rst_n = 1;
    expv = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      vin = 1'($urandom);
      din = 16'($urandom);
      @(posedge clk);
      expvld = vin;
      if (vin) expv = din;
      #1;
      checks++;
      if (vout !== expvld || dout !== expv) begin
        failures++;
        $display("FAIL cycle %0d: v=%b d=%04x expected v=%b d=%04x", i, vout, dout, expvld, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
