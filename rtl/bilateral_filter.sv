// bilateral_filter: low-power approximate bilateral filter for 8-bit
// grey-scale image denoising, with flip-flop based clock gating.
//
// Each cycle the host presents one pixel: its raster index `pixel` and the
// 3x3 neighbourhood `window` around it (window[1][1] is the pixel itself).
// The area detection logic finds from the index and the image size
// (`row` x `col`) whether the pixel lies in a corner, on a border or in the
// interior; the filter processing unit masks the window taps outside the
// image, weights each remaining tap by a fixed spatial weight times an
// approximate, table-based range weight, and normalises. The result is
// loaded into the output register `data_filtered`; `done` rises once the
// last pixel (index row*col - 1) has been filtered.
//
// The output register and the done flag are clocked by `gated_clk`, made
// by flipflop_based_clk from `clk` and `enable`. With `enable` low they
// receive no clock edges at all and hold their values, which is where the
// power saving comes from. `clk_active` shows the registered enable.
//
// Timing: `enable` is sampled on the falling edge of clk. The other inputs
// are sampled on the rising edge of gated_clk; when `write` and `start` are
// both high on that edge, data_filtered shows the result for that pixel
// from then on (one cycle of latency, one pixel per cycle). `start` is a
// level: it stays high for the whole image, and dropping it clears done.
// `reset` is asynchronous and active high. An assertion checks that every
// pixel index written lies inside the row x col image.
//
// Following the published design: the block structure (clock gating, area
// detection, a case statement on the area, three filter stages, output
// register, done logic), the names of the control ports, the 32-bit pixel
// index and image size and the 8-bit result. This design's own choices:
// the 3x3 window brought in on ports, the kernels and the range-weight
// table (see bf_pkg), the meaning of start and write, and the
// falling-edge gating flip-flop.
module bilateral_filter
  import bf_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned IDX_W  = 32
) (
  input  logic                        clk,
  input  logic                        reset,
  input  logic                        enable,
  input  logic                        write,
  input  logic                        start,
  input  logic [IDX_W-1:0]            pixel,
  input  logic [IDX_W-1:0]            row,
  input  logic [IDX_W-1:0]            col,
  input  logic [2:0][2:0][DATA_W-1:0] window,
  output logic [DATA_W-1:0]           data_filtered,
  output logic                        done,
  output logic                        clk_active
);

  logic              gated_clk;
  area_e             area;
  logic [DATA_W-1:0] filtered;

  flipflop_based_clk f1 (
    .clk       (clk),
    .reset     (reset),
    .enable    (enable),
    .q_out     (clk_active),
    .gated_clk (gated_clk)
  );

  area_detect #(.IDX_W(IDX_W)) u_area (
    .pixel (pixel),
    .row   (row),
    .col   (col),
    .area  (area)
  );

  filter_processing_unit #(.DATA_W(DATA_W)) u_fpu (
    .area     (area),
    .window   (window),
    .filtered (filtered)
  );

  output_register #(.DATA_W(DATA_W)) u_out (
    .clk   (gated_clk),
    .reset (reset),
    .load  (write && start),
    .d     (filtered),
    .q     (data_filtered)
  );

  done_logic #(.IDX_W(IDX_W)) u_done (
    .clk   (gated_clk),
    .reset (reset),
    .start (start),
    .write (write),
    .pixel (pixel),
    .row   (row),
    .col   (col),
    .done  (done)
  );

  // Rule of the pixel interface: every pixel written belongs to the image.
  // No reset qualifier is needed: reset closes the clock gate, so gated_clk
  // has no edges while reset is high.
  a_pixel_in_image : assert property (
    @(posedge gated_clk) (write && start) |-> (pixel < row * col)
  ) else $error("pixel index %0d outside a %0d x %0d image", pixel, row, col);

endmodule
