// tb_denoise_samples: denoising workload for the bilateral filter at its
// default parameters. Two 256 x 256 test scenes are generated, each with
// strong grain noise (approximately Gaussian, standard deviation about 25
// grey levels, made as the sum of four uniform variables):
//   scene 1: discs of different brightness on a shaded background, to show
//            that round edges survive while flat areas are smoothed;
//   scene 2: bars and stripes of several widths and a fine diagonal
//            texture, to show linear detail is kept.
// Each scene is streamed through the filter one pixel per clock; every
// result is compared with the reference model, and the peak signal-to-
// noise ratio (PSNR) and signal-to-noise ratio (SNR) of the noisy and the
// filtered image against the clean scene are printed. The filter must
// improve both on each scene.
module tb_denoise_samples;
  import bf_ref_pkg::*;

  localparam int H = 256, W = 256, N = H * W;

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
  int clean [N];
  int noisy [N];
  int outimg [N];

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

  function automatic int clip(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic int grain();
    int s;
    s = 0;
    repeat (4) s += int'($urandom_range(0, 44)) - 22;
    return s;
  endfunction

  function automatic void make_scene(int which);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        if (which == 1) begin
          v = 90 + (y * 40) / H;
          for (int k = 0; k < 4; k++) begin
            int cx, cy, rad, dx, dy;
            cx  = 50 + 50 * k;
            cy  = (k % 2 == 0) ? 80 : 170;
            rad = 18 + 6 * k;
            dx  = x - cx;
            dy  = y - cy;
            if (dx * dx + dy * dy < rad * rad) v = (k % 2 == 0) ? 220 : 30;
          end
        end else begin
          v = 120;
          if (y < 128) v = ((x / (4 + y / 16)) % 2 == 0) ? 200 : 50;  // stripes, widening
          else if (((x + y) / 3) % 2 == 0) v = 140;                   // fine diagonal texture
          if (x > 100 && x < 110) v = 240;                             // vertical bar
        end
        clean[y * W + x] = v;
        noisy[y * W + x] = clip(v + grain());
      end
  endfunction

  function automatic int present(int p);
    int  win [9];
    bit  in_img [9];
    int  x, y, yy, xx;
    y = p / W;
    x = p % W;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        yy = y + r - 1;
        xx = x + c - 1;
        in_img[r*3+c] = (yy >= 0 && yy < H && xx >= 0 && xx < W);
        win[r*3+c]    = in_img[r*3+c] ? noisy[yy * W + xx] : 0;
        window[r][c]  = 8'(win[r*3+c]);
      end
    pixel = p;
    return ref_filter(win, in_img, 8);
  endfunction

  function automatic void quality(bit filtered, output real psnr_db, output real snr_db);
    real se, sig;
    se  = 0.0;
    sig = 0.0;
    for (int i = 0; i < N; i++) begin
      real e;
      e    = real'((filtered ? outimg[i] : noisy[i]) - clean[i]);
      se  += e * e;
      sig += real'(clean[i]) * real'(clean[i]);
    end
    psnr_db = 10.0 * $log10(255.0 * 255.0 * N / se);
    snr_db  = 10.0 * $log10(sig / se);
  endfunction

  initial begin
    real pn, sn, pf, sf;
    enable = 1'b1; write = 1'b0; start = 1'b0;
    pixel = '0; row = H; col = W; window = '0;
    #1 reset = 1'b1;
    #12;
    @(posedge clk); #1;
    reset = 1'b0;
    for (int scene = 1; scene <= 2; scene++) begin
      make_scene(scene);
      start = 1'b1;
      write = 1'b1;
      for (int p = 0; p < N; p++) begin
        int e;
        e = present(p);
        @(posedge clk); #1;
        outimg[p] = data_filtered;
        check(data_filtered == 8'(e), $sformatf("scene %0d pixel %0d: got %0d expected %0d",
                                                scene, p, data_filtered, e));
      end
      write = 1'b0;
      check(done == 1'b1, "done not raised at the end of the scene");
      start = 1'b0;
      @(posedge clk); #1;
      quality(1'b0, pn, sn);
      quality(1'b1, pf, sf);
      $display("scene %0d: noisy PSNR %0.2f dB SNR %0.2f dB; filtered PSNR %0.2f dB SNR %0.2f dB",
               scene, pn, sn, pf, sf);
      check(pf > pn, "filter did not improve PSNR");
      check(sf > sn, "filter did not improve SNR");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
