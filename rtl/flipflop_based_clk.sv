// flipflop_based_clk: flip-flop based clock gate.
//
// A D flip-flop registers the gating control `enable`; its output `q_out`
// and the free-running clock `clk` drive a two-input AND whose output is
// `gated_clk`. While q_out is low, gated_clk stays low and every register
// clocked by it holds its value without switching.
//
// The flip-flop and the AND gate, the port names and the asynchronous
// clear follow the published clock-gating cell. The flip-flop samples
// `enable` on the falling edge of clk: that edge is this design's choice.
// With a falling-edge flip-flop q_out can change only while clk is low, so
// the AND never cuts a high clock phase short and gated_clk has no glitch;
// a rising-edge flip-flop feeding the same AND would let q_out fall while
// clk is high and leave a runt pulse on gated_clk.
//
// Timing: `enable` must be stable at the falling edge of clk that precedes
// the rising edge it is meant to pass or block. `reset` (active high,
// asynchronous) clears q_out, so the clock is gated off after reset until
// enable has been sampled high.
module flipflop_based_clk (
  input  logic clk,
  input  logic reset,
  input  logic enable,
  output logic q_out,
  output logic gated_clk
);

  always_ff @(negedge clk or posedge reset) begin
    if (reset) q_out <= 1'b0;
    else       q_out <= enable;
  end

  assign gated_clk = clk & q_out;

endmodule
