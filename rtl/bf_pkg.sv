// bf_pkg: types and constants shared by the approximate bilateral filter.
//
// The filter works on a 3x3 neighbourhood. Its weight for a neighbour is the
// product of a spatial weight (fixed by the neighbour's distance from the
// centre) and a range weight (set by how much the neighbour's intensity
// differs from the centre's). The range weight is where the approximation
// lies: instead of evaluating a Gaussian of the intensity difference, the
// difference is cut to its three most significant bits and those bits index
// an eight-entry table.
//
// Range table, for an 8-bit pixel and intensity-difference bin k = |d| >> 5:
//   w_r(k) = round(16 * exp(-(32*k)^2 / (2 * 64^2)))   (sigma_r = 64 levels)
// giving 16, 14, 10, 5, 2, 1, 0, 0.
// Spatial kernel: w_s = 4 at the centre, 2 at the four edge-adjacent
// neighbours and 1 at the four corners, i.e. w_s = 2^(2 - |dy| - |dx|).
//
// The image is divided into nine areas by the position of the centre pixel.
// In a border or corner area some taps of the 3x3 window fall outside the
// image; the filter leaves them out of both sums.
//
// Choices of this design, not taken from the literature it follows: the
// window size, both kernels, sigma_r, the 3-bit quantisation of the
// difference and the nine-way area split.
package bf_pkg;

  // Weight widths: range weight <= 16, spatial weight <= 4, product <= 64.
  localparam int unsigned WR_W = 5;
  localparam int unsigned WS_W = 3;
  localparam int unsigned W_W  = WR_W + WS_W - 1;  // 7 bits hold 64

  // Spatial weights of the 3x3 window.
  localparam int unsigned WS_CORNER = 1;
  localparam int unsigned WS_EDGE   = 2;
  localparam int unsigned WS_CENTRE = 4;

  // Areas of the image, named by where the centre pixel lies.
  typedef enum logic [3:0] {
    AREA_TOP_LEFT     = 4'd0,
    AREA_TOP          = 4'd1,
    AREA_TOP_RIGHT    = 4'd2,
    AREA_LEFT         = 4'd3,
    AREA_INTERIOR     = 4'd4,
    AREA_RIGHT        = 4'd5,
    AREA_BOTTOM_LEFT  = 4'd6,
    AREA_BOTTOM       = 4'd7,
    AREA_BOTTOM_RIGHT = 4'd8
  } area_e;

  // Approximate range kernel: eight-entry table indexed by the top three
  // bits of the absolute intensity difference.
  function automatic logic [WR_W-1:0] range_weight(input logic [2:0] bin);
    case (bin)
      3'd0:    range_weight = 5'd16;
      3'd1:    range_weight = 5'd14;
      3'd2:    range_weight = 5'd10;
      3'd3:    range_weight = 5'd5;
      3'd4:    range_weight = 5'd2;
      3'd5:    range_weight = 5'd1;
      default: range_weight = 5'd0;
    endcase
  endfunction

endpackage
