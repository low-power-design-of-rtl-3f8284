// filter_processing_unit: the bilateral filter's arithmetic core.
//
// A case statement on the image area turns the area into a 3x3 mask of the
// window taps that lie inside the image (a pixel on the top border has no
// row above it, a corner pixel misses a row and a column). Three filter
// stages (bf_filter_row), one per window row, weight each valid tap by the
// product of its spatial weight and its approximate range weight and form
// partial sums. The unit adds the partial sums and divides, rounding to
// nearest:
//   out = (sum(w * I) + sum(w) / 2) / sum(w)
// The centre tap always counts with weight 4 * 16 = 64, so the divisor is
// never zero and the result is a weighted mean of the window.
//
// Purely combinational; the output register that follows is clocked by the
// gated clock. window[r][c] is the intensity at row offset r-1 and column
// offset c-1 from the centre; window[1][1] is the centre pixel.
//
// The case statement on the area and the filter stages follow the block
// diagram; the normalising divider, the masking of outside taps and the
// kernels (see bf_pkg) are this design's choices.
module filter_processing_unit
  import bf_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  area_e                       area,
  input  logic [2:0][2:0][DATA_W-1:0] window,
  output logic [DATA_W-1:0]           filtered
);

  logic [2:0][2:0]      mask;    // mask[r][c]: tap inside the image
  logic [7:0]           den_r [3];
  logic [DATA_W+7:0]    num_r [3];
  logic [8:0]           den;
  logic [DATA_W+9:0]    num;

  // Case statement based on area.
  always_comb begin
    mask = '1;
    case (area)
      AREA_TOP_LEFT:     begin mask[0] = '0; for (int r = 0; r < 3; r++) mask[r][0] = 1'b0; end
      AREA_TOP:          begin mask[0] = '0; end
      AREA_TOP_RIGHT:    begin mask[0] = '0; for (int r = 0; r < 3; r++) mask[r][2] = 1'b0; end
      AREA_LEFT:         begin for (int r = 0; r < 3; r++) mask[r][0] = 1'b0; end
      AREA_RIGHT:        begin for (int r = 0; r < 3; r++) mask[r][2] = 1'b0; end
      AREA_BOTTOM_LEFT:  begin mask[2] = '0; for (int r = 0; r < 3; r++) mask[r][0] = 1'b0; end
      AREA_BOTTOM:       begin mask[2] = '0; end
      AREA_BOTTOM_RIGHT: begin mask[2] = '0; for (int r = 0; r < 3; r++) mask[r][2] = 1'b0; end
      default:           mask = '1;  // interior
    endcase
  end

  // Three filter stages: outer rows use weights 1,2,1; the centre row 2,4,2.
  bf_filter_row #(.DATA_W(DATA_W), .WS_SIDE(WS_CORNER), .WS_MID(WS_EDGE)) u_filter_top (
    .taps(window[0]), .centre(window[1][1]), .valid(mask[0]), .den(den_r[0]), .num(num_r[0])
  );
  bf_filter_row #(.DATA_W(DATA_W), .WS_SIDE(WS_EDGE), .WS_MID(WS_CENTRE)) u_filter_mid (
    .taps(window[1]), .centre(window[1][1]), .valid(mask[1]), .den(den_r[1]), .num(num_r[1])
  );
  bf_filter_row #(.DATA_W(DATA_W), .WS_SIDE(WS_CORNER), .WS_MID(WS_EDGE)) u_filter_bot (
    .taps(window[2]), .centre(window[1][1]), .valid(mask[2]), .den(den_r[2]), .num(num_r[2])
  );

  // Sum the partial products and normalise.
  // The quotient is a weighted mean of DATA_W-bit values, so its upper bits
  // are always zero and are dropped.
  always_comb begin
    den      = 9'(den_r[0]) + 9'(den_r[1]) + 9'(den_r[2]);
    num      = (DATA_W+10)'(num_r[0]) + (DATA_W+10)'(num_r[1]) + (DATA_W+10)'(num_r[2]);
    filtered = DATA_W'((num + (DATA_W+10)'(den >> 1)) / (DATA_W+10)'(den));
  end

endmodule
