// area_detect: area detection logic of the bilateral filter.
//
// The pixel index counts the pixels of the image in raster order, row by
// row from the top-left corner. From it and the image size the block works
// out the pixel's column x = pixel mod col and row y = pixel div col, and
// names the area the pixel lies in: one of the four corners, one of the
// four borders or the interior. The filter processing unit uses the area
// to select which taps of the 3x3 window lie inside the image.
//
// Purely combinational. Interface: `pixel` is the raster index of the
// centre pixel, `row` and `col` the image height and width, `area` the
// result. Areas are defined for images of at least 2 x 2 pixels; for a
// single row or column the top and left areas take priority.
//
// That the area is found from the pixel index and the image size follows
// the block diagram, where the pixel index feeds the area detection; the
// nine-way split is this design's choice.
module area_detect
  import bf_pkg::*;
#(
  parameter int unsigned IDX_W = 32
) (
  input  logic [IDX_W-1:0] pixel,
  input  logic [IDX_W-1:0] row,
  input  logic [IDX_W-1:0] col,
  output area_e            area
);

  logic [IDX_W-1:0] x, y;
  logic top, bottom, left, right;

  always_comb begin
    y      = pixel / col;
    x      = pixel - y * col;
    top    = (y == '0);
    bottom = (y == row - 1'b1);
    left   = (x == '0);
    right  = (x == col - 1'b1);

    if (top) begin
      if (left)       area = AREA_TOP_LEFT;
      else if (right) area = AREA_TOP_RIGHT;
      else            area = AREA_TOP;
    end else if (bottom) begin
      if (left)       area = AREA_BOTTOM_LEFT;
      else if (right) area = AREA_BOTTOM_RIGHT;
      else            area = AREA_BOTTOM;
    end else begin
      if (left)       area = AREA_LEFT;
      else if (right) area = AREA_RIGHT;
      else            area = AREA_INTERIOR;
    end
  end

endmodule
