// tb_output_register: self-checking test of the output register. It drives
// random data with a random load enable and checks that the register
// takes the data on a rising edge only when load is high, holds otherwise,
// and is cleared at once by the asynchronous reset.
module tb_output_register;

  logic clk = 1'b0, reset = 1'b0, load;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0, loads = 0, holds = 0;

  output_register dut (.clk, .reset, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; d = 8'h5a;
    #1 reset = 1'b1;
    #2;
    checks++;
    if (q != 8'd0) begin failures++; $display("FAIL: reset"); end
    @(posedge clk); #1;
    reset = 1'b0;
    model = 8'd0;
    repeat (1000) begin
      load = 1'($urandom);
      d    = 8'($urandom);
      @(posedge clk); #1;
      if (load) begin model = d; loads++; end else holds++;
      checks++;
      if (q != model) begin failures++; $display("FAIL: q=%0d expected %0d", q, model); end
    end
    // Asynchronous reset between clock edges.
    #2 reset = 1'b1; #1;
    checks++;
    if (q != 8'd0) begin failures++; $display("FAIL: asynchronous reset"); end
    checks++;
    if (loads == 0 || holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
