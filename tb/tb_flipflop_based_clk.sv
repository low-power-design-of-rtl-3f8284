// tb_flipflop_based_clk: self-checking test of the flip-flop based clock
// gate. It drives a 10 ns clock and a random enable pattern (changed right
// after each rising edge), and checks that q_out equals the enable value
// sampled at the previous falling edge, that gated_clk equals clk AND
// q_out at every sampling point, that every high pulse of gated_clk lasts
// a full half period (no runt pulses), that the number of gated rising
// edges equals the number of enabled cycles, and that reset clears q_out.
module tb_flipflop_based_clk;

  logic clk = 1'b0, reset = 1'b0, enable, q_out, gated_clk;
  int checks = 0, failures = 0;
  int gated_edges = 0, expected_edges = 0;
  realtime rise_t;
  logic sampled_en;

  flipflop_based_clk dut (.clk, .reset, .enable, .q_out, .gated_clk);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Pulse width of the gated clock.
  bit counting = 1'b0;  // set once reset has been applied
  always @(posedge gated_clk) if (counting) begin
    gated_edges++;
    rise_t = $realtime;
  end
  always @(negedge gated_clk) if (counting && !reset) check($realtime - rise_t == 5.0, "gated_clk pulse is not a full half period");

  always @(negedge clk) sampled_en <= enable;

  initial begin
    enable = 1'b1;
    #1 reset = 1'b1;
    counting = 1'b1;
    #11;
    check(q_out == 1'b0 && gated_clk == 1'b0, "reset does not clear q_out");
    @(posedge clk); #1;
    reset  = 1'b0;
    enable = 1'b0;
    @(posedge clk); #1;
    repeat (300) begin
      enable = ($urandom_range(0, 2) != 0);
      @(negedge clk); #1;
      check(q_out == enable, "q_out does not follow enable sampled at the falling edge");
      if (enable) expected_edges++;
      @(posedge clk); #1;
      check(gated_clk == (clk & q_out), "gated_clk is not clk AND q_out (high phase)");
      check(gated_clk == q_out, "gated_clk did not pass the clock edge");
    end
    // Asynchronous reset in the middle of a high phase closes the gate.
    enable = 1'b1;
    @(negedge clk); #1; expected_edges++;
    @(posedge clk); #1;
    reset = 1'b1; #1;
    check(q_out == 1'b0, "asynchronous reset does not clear q_out");
    reset = 1'b0;
    enable = 1'b0;
    @(negedge clk); #1;
    repeat (5) begin @(posedge clk); #1; check(gated_clk == 1'b0, "clock passes while disabled"); end
    check(gated_edges == expected_edges, $sformatf("gated edges %0d, expected %0d", gated_edges, expected_edges));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
