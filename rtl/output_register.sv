// output_register: holds the filtered pixel.
//
// On a rising edge of its clock, with `load` high, the register takes the
// filter's result; otherwise it holds. In the filter it is clocked by the
// gated clock, so while the clock gate is closed it does not switch at
// all, and `load` (write and start both high) acts as its clock enable.
// `reset` clears it asynchronously.
//
// The register and its clock enable follow the published timing report,
// which lists paths into both the D and the CE pins of data_filtered_reg;
// the reset is this design's choice.
module output_register #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              load,
  input  logic [DATA_W-1:0] d,
  output logic [DATA_W-1:0] q
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)     q <= '0;
    else if (load) q <= d;
  end

endmodule
