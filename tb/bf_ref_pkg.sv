// bf_ref_pkg: reference model of the approximate bilateral filter, used by
// the testbenches to work out expected results independently of the RTL.
//
// The range weight is computed here from its defining formula with real
// arithmetic, w_r(k) = round(16 * exp(-(32k)^2 / (2 * 64^2))) for
// k = |d| >> (DATA_W - 3), and the spatial weight as 2^(2 - |dy| - |dx|).
// Which taps lie inside the image is decided from the pixel's coordinates,
// not from an area code. The result is the weighted mean rounded to
// nearest.
package bf_ref_pkg;

  function automatic int ref_range_weight(input int absdiff, input int data_w);
    int  k;
    real d;
    k = absdiff >> (data_w - 3);
    d = 32.0 * k;
    return int'($floor(16.0 * $exp(-(d * d) / (2.0 * 64.0 * 64.0)) + 0.5));
  endfunction

  function automatic int ref_spatial_weight(input int dy, input int dx);
    int a;
    a = (dy < 0 ? -dy : dy) + (dx < 0 ? -dx : dx);
    return 4 >> a;
  endfunction

  // win[r*3+c] holds the tap at row offset r-1, column offset c-1;
  // in_img[r*3+c] says whether that tap lies inside the image.
  function automatic int ref_filter(input int win[9], input bit in_img[9], input int data_w);
    int num, den, w, d;
    num = 0;
    den = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        if (!in_img[r*3+c]) continue;
        d = win[r*3+c] - win[4];
        if (d < 0) d = -d;
        w = ref_spatial_weight(r - 1, c - 1) * ref_range_weight(d, data_w);
        num += w * win[r*3+c];
        den += w;
      end
    return (num + den / 2) / den;
  endfunction

endpackage
