// tb_bilateral_filter: end-to-end test of the approximate bilateral filter
// at its default parameters, on a full 256 x 256 image.
//
// The testbench draws a clean test image (a brightness ramp with bright and
// dark discs and a bar, so that it has both flat areas and sharp edges),
// adds noise, and streams the noisy image through the filter in raster
// order, one pixel and its 3x3 neighbourhood per cycle. Neighbourhood taps
// that fall outside the image are filled with random values, which the
// filter must ignore. Every result is compared, one cycle after its pixel
// was presented, with the reference model in bf_ref_pkg.
//
// Mechanisms exercised and counted: each of the nine image areas; cycles
// with the clock gate closed (enable low), during which a write is offered
// and must not reach the output register; idle cycles with write low;
// done rising exactly after the last pixel; done cleared by dropping
// start. A second, 5 x 7 image follows to show that the image size is
// taken from the row and col inputs. The testbench also reports the peak
// signal-to-noise ratio of the noisy and the filtered image against the
// clean one and requires the filter to improve it.
module tb_bilateral_filter;
  import bf_pkg::*;
  import bf_ref_pkg::*;

  logic                 clk = 1'b0, reset = 1'b0;
  logic                 enable, write, start;
  logic [31:0]          pixel, row, col;
  logic [2:0][2:0][7:0] window;
  logic [7:0]           data_filtered;
  logic                 done, clk_active;

  bilateral_filter dut (
    .clk, .reset, .enable, .write, .start, .pixel, .row, .col, .window,
    .data_filtered, .done, .clk_active
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int area_hits [9];
  int gated_cycles = 0, idle_cycles = 0, done_rises = 0, done_clears = 0;
  int cycles = 0;

  always @(posedge clk) cycles++;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  localparam int MAXN = 256 * 256;
  int clean [MAXN];
  int noisy [MAXN];
  int outimg [MAXN];

  function automatic int clip(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic void make_image(int h, int w);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        int v, dx1, dy1, dx2, dy2;
        v   = 60 + (x * 80) / w;
        dx1 = x - w / 3;      dy1 = y - h / 3;
        dx2 = x - 2 * w / 3;  dy2 = y - 2 * h / 3;
        if (dx1 * dx1 + dy1 * dy1 < (h / 5) * (h / 5)) v = 220;
        if (dx2 * dx2 + dy2 * dy2 < (h / 6) * (h / 6)) v = 25;
        if (y > (h * 3) / 4 && y < (h * 3) / 4 + 8 && x > w / 8 && x < w / 2) v = 180;
        clean[y * w + x] = v;
        noisy[y * w + x] = clip(v + int'($urandom_range(0, 40)) - 20);
      end
  endfunction

  // Present pixel p of an h x w image; returns the expected result.
  function automatic int present(int p, int h, int w);
    int  win [9];
    bit  in_img [9];
    int  x, y, yy, xx;
    y = p / w;
    x = p % w;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        yy = y + r - 1;
        xx = x + c - 1;
        in_img[r*3+c] = (yy >= 0 && yy < h && xx >= 0 && xx < w);
        win[r*3+c]    = in_img[r*3+c] ? noisy[yy * w + xx] : int'($urandom_range(0, 255));
        window[r][c]  = 8'(win[r*3+c]);
      end
    pixel = p;
    return ref_filter(win, in_img, 8);
  endfunction

  function automatic int area_of(int p, int h, int w);
    int y, x;
    y = p / w;
    x = p % w;
    return ((y == 0) ? 0 : (y == h - 1) ? 6 : 3) + ((x == 0) ? 0 : (x == w - 1) ? 2 : 1);
  endfunction

  task automatic run_image(input int h, input int w, input bit with_stalls);
    int n, expected, held, first_cycle, stalls;
    n = h * w;
    row = h;
    col = w;
    start = 1'b1;
    stalls = 0;
    first_cycle = cycles;
    for (int p = 0; p < n; p++) begin
      // Occasionally close the clock gate and offer a write it must block.
      if (with_stalls && $urandom_range(0, 49) == 0) begin
        held   = data_filtered;
        enable = 1'b0;
        write  = 1'b1;
        void'(present($urandom_range(0, n - 1), h, w));
        @(posedge clk); #1;
        check(data_filtered == 8'(held), "output register changed with the clock gated");
        check(clk_active == 1'b0, "clk_active high with enable low");
        check(done == 1'b0, "done raised while the clock was gated");
        gated_cycles++;
        stalls++;
        enable = 1'b1;
      end
      // Occasionally idle with write low.
      if (with_stalls && $urandom_range(0, 49) == 0) begin
        held  = data_filtered;
        write = 1'b0;
        void'(present($urandom_range(0, n - 1), h, w));
        @(posedge clk); #1;
        check(data_filtered == 8'(held), "output register changed without write");
        idle_cycles++;
        stalls++;
      end
      write    = 1'b1;
      expected = present(p, h, w);
      area_hits[area_of(p, h, w)]++;
      @(posedge clk); #1;
      outimg[p] = data_filtered;
      check(data_filtered == 8'(expected),
            $sformatf("pixel %0d of %0dx%0d: got %0d expected %0d", p, h, w, data_filtered, expected));
      check(done == (p == n - 1), $sformatf("done=%b after pixel %0d of %0d", done, p, n));
      if (done) done_rises++;
    end
    write = 1'b0;
    check(cycles - first_cycle == n + stalls,
          $sformatf("%0d cycles for %0d pixels and %0d stalls", cycles - first_cycle, n, stalls));
    repeat (2) begin @(posedge clk); #1; check(done == 1'b1, "done did not hold"); end
    start = 1'b0;
    @(posedge clk); #1;
    check(done == 1'b0, "dropping start did not clear done");
    if (!done) done_clears++;
  endtask

  function automatic real psnr(int h, int w, bit filtered);
    real mse;
    mse = 0.0;
    for (int i = 0; i < h * w; i++) begin
      real e;
      e = real'((filtered ? outimg[i] : noisy[i]) - clean[i]);
      mse += e * e;
    end
    mse = mse / (h * w);
    return 10.0 * $log10(255.0 * 255.0 / mse);
  endfunction

  initial begin
    real p_noisy, p_filt;
    enable = 1'b1; write = 1'b0; start = 1'b0;
    pixel = '0; row = 32'd256; col = 32'd256; window = '0;
    #1 reset = 1'b1;
    #12;
    check(data_filtered == 8'd0 && done == 1'b0, "reset state");
    @(posedge clk); #1;
    reset = 1'b0;
    @(posedge clk); #1;

    make_image(256, 256);
    run_image(256, 256, 1'b1);
    p_noisy = psnr(256, 256, 1'b0);
    p_filt  = psnr(256, 256, 1'b1);
    $display("256x256 image: PSNR noisy %0.2f dB, filtered %0.2f dB", p_noisy, p_filt);
    check(p_filt > p_noisy + 3.0, "filter did not improve PSNR by 3 dB");

    make_image(5, 7);
    run_image(5, 7, 1'b0);

    $display("areas hit: %p", area_hits);
    $display("gated cycles %0d, idle cycles %0d, done rises %0d, done clears %0d",
             gated_cycles, idle_cycles, done_rises, done_clears);
    for (int a = 0; a < 9; a++) check(area_hits[a] > 0, $sformatf("area %0d never exercised", a));
    check(gated_cycles > 0, "clock gate never closed");
    check(idle_cycles > 0, "no idle cycle");
    check(done_rises == 2, "done did not rise once per image");
    check(done_clears == 2, "done not cleared after each image");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
