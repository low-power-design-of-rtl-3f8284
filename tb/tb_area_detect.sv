// tb_area_detect: self-checking test of the area detection logic. For
// several image sizes it walks every pixel position (x, y) with nested
// loops, presents the raster index y*col + x, and compares the area with
// the one named by the position itself (first/last row, first/last
// column).
module tb_area_detect;
  import bf_pkg::*;

  logic [31:0] pixel, row, col;
  area_e area;
  int checks = 0, failures = 0;
  int hits [9];

  area_detect dut (.pixel, .row, .col, .area);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic area_e expected(int x, int y, int w, int h);
    int vr, hc;
    vr = (y == 0) ? 0 : (y == h - 1) ? 2 : 1;
    hc = (x == 0) ? 0 : (x == w - 1) ? 2 : 1;
    return area_e'(vr * 3 + hc);
  endfunction

  initial begin
    int sizes [6][2] = '{'{2, 2}, '{3, 5}, '{7, 4}, '{16, 16}, '{256, 256}, '{33, 640}};
    foreach (sizes[s]) begin
      row = sizes[s][0];
      col = sizes[s][1];
      for (int y = 0; y < sizes[s][0]; y++)
        for (int x = 0; x < sizes[s][1]; x++) begin
          pixel = y * sizes[s][1] + x;
          #1;
          checks++;
          hits[int'(area)]++;
          if (area != expected(x, y, sizes[s][1], sizes[s][0])) begin
            failures++;
            if (failures < 10)
              $display("FAIL: %0dx%0d x=%0d y=%0d got %s", sizes[s][0], sizes[s][1], x, y, area.name());
          end
        end
    end
    for (int a = 0; a < 9; a++) begin
      checks++;
      if (hits[a] == 0) begin failures++; $display("FAIL: area %0d never seen", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
