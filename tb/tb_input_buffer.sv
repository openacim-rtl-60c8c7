// tb_input_buffer: checks reset, load and hold of the input register.
module tb_input_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  logic [7:0] din = 0, dout, expv;
  always #5 clk = ~clk;

  input_buffer dut (.clk, .rst_n, .load, .data_in(din), .data_out(dout));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (dout !== 8'd0) begin failures++; $display("FAIL reset value %02x", dout); end
    rst_n = 1;
    expv = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load = 1'($urandom);
      din  = 8'($urandom);
      @(posedge clk);
      if (load) expv = din;
      #1;
      checks++;
      if (dout !== expv) begin failures++; $display("FAIL cycle %0d: %02x expected %02x", i, dout, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
