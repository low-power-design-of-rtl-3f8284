// tb_filter_processing_unit: self-checking test of the filter processing
// unit. For every one of the nine areas it drives random windows (uniform
// noise, and a smooth patch with small noise crossed by a step edge) and
// compares the result with the reference model, whose taps inside the
// image are worked out from the area's row and column offsets rather than
// from the RTL's case statement. It also checks that taps outside the
// image cannot change the result.
module tb_filter_processing_unit;
  import bf_pkg::*;
  import bf_ref_pkg::*;

  area_e                 area;
  logic [2:0][2:0][7:0]  window;
  logic [7:0]            filtered;
  int checks = 0, failures = 0;

  filter_processing_unit dut (.area, .window, .filtered);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_for(area_e a, logic [2:0][2:0][7:0] w);
    int  win [9];
    bit  in_img [9];
    int  vr, hc;
    vr = int'(a) / 3;  // 0: top row of the image, 1: middle, 2: bottom
    hc = int'(a) % 3;  // 0: left column, 1: middle, 2: right
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        win[r*3+c]    = w[r][c];
        in_img[r*3+c] = !((vr == 0 && r == 0) || (vr == 2 && r == 2) ||
                          (hc == 0 && c == 0) || (hc == 2 && c == 2));
      end
    return ref_filter(win, in_img, 8);
  endfunction

  task automatic run_one();
    int e;
    logic [7:0] first;
    #1;
    e = expect_for(area, window);
    checks++;
    if (filtered != 8'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL: area=%s window=%p got %0d exp %0d", area.name(), window, filtered, e);
    end
    // Scramble the taps outside the image: the result must not move.
    first = filtered;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if ((int'(area) / 3 == 0 && r == 0) || (int'(area) / 3 == 2 && r == 2) ||
            (int'(area) % 3 == 0 && c == 0) || (int'(area) % 3 == 2 && c == 2))
          window[r][c] = 8'($urandom);
    #1;
    checks++;
    if (filtered != first) begin
      failures++;
      $display("FAIL: area=%s result depends on taps outside the image", area.name());
    end
  endtask

  initial begin
    for (int a = 0; a < 9; a++) begin
      area = area_e'(a);
      repeat (1000) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            window[r][c] = 8'($urandom);
        run_one();
      end
      repeat (1000) begin
        int base, step, col_edge;
        base     = $urandom_range(20, 200);
        step     = $urandom_range(0, 1) ? 60 : -60;
        col_edge = $urandom_range(0, 3);
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) begin
            int v;
            v = base + $urandom_range(0, 20) - 10 + ((c >= col_edge) ? step : 0);
            window[r][c] = 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
          end
        run_one();
      end
      // Extremes.
      window = '1; run_one();
      window = '0; run_one();
      window = '0; window[1][1] = 8'd255; run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
