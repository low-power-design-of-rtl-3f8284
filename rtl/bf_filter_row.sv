// bf_filter_row: one filter stage ("Filter 1") of the bilateral filter.
//
// A stage handles one row of the 3x3 window: three taps. For each tap it
// forms the absolute difference to the centre intensity, looks up the
// approximate range weight from the top three bits of that difference,
// multiplies it by the tap's fixed spatial weight, and accumulates the
// weight (denominator) and weight times intensity (numerator). A tap whose
// `valid` bit is low contributes nothing. Three instances, one per window
// row, make up the filter processing unit, which adds their partial sums.
//
// Purely combinational. Parameters: DATA_W is the intensity width;
// WS_SIDE and WS_MID are the spatial weights of the row's outer taps and
// middle tap (1,2 for the top and bottom rows, 2,4 for the centre row).
// Outputs: `den` is at most 8 * 16 = 128 and `num` at most
// 128 * (2^DATA_W - 1).
//
// Three identical filter stages follow the block diagram; giving each the
// partial sums of one window row is this design's reading of it.
module bf_filter_row
  import bf_pkg::*;
#(
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned WS_SIDE = WS_CORNER,
  parameter int unsigned WS_MID  = WS_EDGE
) (
  input  logic [2:0][DATA_W-1:0] taps,
  input  logic [DATA_W-1:0]      centre,
  input  logic [2:0]             valid,
  output logic [7:0]             den,
  output logic [DATA_W+7:0]      num
);

  logic [DATA_W-1:0] diff [3];
  logic [WR_W-1:0]   wr   [3];
  logic [W_W-1:0]    w    [3];

  always_comb begin
    den = '0;
    num = '0;
    for (int i = 0; i < 3; i++) begin
      diff[i] = (taps[i] > centre) ? taps[i] - centre : centre - taps[i];
      wr[i]   = range_weight(diff[i][DATA_W-1 -: 3]);
      w[i]    = valid[i] ? W_W'(wr[i] * ((i == 1) ? WS_MID : WS_SIDE)) : '0;
      den     = den + 8'(w[i]);
      num     = num + (DATA_W+8)'(w[i] * taps[i]);
    end
  end

endmodule
