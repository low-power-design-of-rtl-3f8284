// done_logic: signals that the whole image has been filtered.
//
// `done` rises on the clock edge that loads the result of the last pixel of
// the image, the one whose raster index is row * col - 1, into the output
// register, and stays high while `start` stays high. Dropping `start`
// clears it, ready for the next image. `reset` clears it asynchronously.
// In the filter it is clocked by the gated clock.
//
// A done flag raised after the last pixel follows the block diagram; how
// the last pixel is recognised and how done is cleared are this design's
// choices.
module done_logic #(
  parameter int unsigned IDX_W = 32
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic             write,
  input  logic [IDX_W-1:0] pixel,
  input  logic [IDX_W-1:0] row,
  input  logic [IDX_W-1:0] col,
  output logic             done
);

  logic last;
  assign last = (pixel == row * col - 1'b1);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)              done <= 1'b0;
    else if (!start)        done <= 1'b0;
    else if (write && last) done <= 1'b1;
  end

endmodule
