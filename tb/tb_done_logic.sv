// tb_done_logic: self-checking test of the done logic. For a few image
// sizes it writes every pixel index in order, with random idle cycles, and
// checks that done stays low until the edge that takes the last index
// (row*col - 1), is high from then on while start is high, ignores writes
// while start is low, and is cleared by dropping start.
module tb_done_logic;

  logic clk = 1'b0, reset = 1'b0, start, write;
  logic [31:0] pixel, row, col;
  logic done;
  int checks = 0, failures = 0;

  done_logic dut (.clk, .reset, .start, .write, .pixel, .row, .col, .done);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_done(input bit e, input string what);
    checks++;
    if (done !== e) begin failures++; $display("FAIL at %0t: done=%b, %s", $time, done, what); end
  endtask

  initial begin
    int sizes [3][2] = '{'{2, 3}, '{5, 4}, '{16, 16}};
    start = 1'b0; write = 1'b0; pixel = '0; row = 32'd2; col = 32'd3;
    #1 reset = 1'b1;
    #2;
    expect_done(1'b0, "after reset");
    @(posedge clk); #1;
    reset = 1'b0;
    foreach (sizes[s]) begin
      int n;
      row = sizes[s][0];
      col = sizes[s][1];
      n   = sizes[s][0] * sizes[s][1];
      // The last index presented while start is low must not raise done.
      pixel = n - 1; write = 1'b1;
      @(posedge clk); #1;
      expect_done(1'b0, "write while start is low");
      start = 1'b1;
      for (int p = 0; p < n; p++) begin
        while ($urandom_range(0, 3) == 0) begin
          write = 1'b0; pixel = 32'($urandom);
          @(posedge clk); #1;
          expect_done(1'b0, "idle cycle before the last pixel");
        end
        write = 1'b1; pixel = p;
        @(posedge clk); #1;
        expect_done(p == n - 1, "after a pixel write");
      end
      write = 1'b0;
      repeat (3) begin @(posedge clk); #1; expect_done(1'b1, "done holds while start is high"); end
      start = 1'b0;
      @(posedge clk); #1;
      expect_done(1'b0, "dropping start clears done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
