// level_to_pulse: turns the codec's "ready" level into a one-cycle pulse.
//
// The codec raises ready once per audio sample (48 kHz) and holds it for
// many system clock cycles. This block registers the level and outputs
// pulse = level & ~level_last, so pulse is high for exactly one clk cycle,
// the cycle after the rising edge of level is first seen. The pulse is the
// clock enable of the FFT and of the spectrum scan. The edge detector is the
// design's; the one-cycle width and reset-to-zero behaviour are this
// implementation's choices.
module level_to_pulse (
  input  logic clk,
  input  logic rst,
  input  logic level,
  output logic pulse
);
  logic level_q;

  always_ff @(posedge clk) begin
    if (rst) level_q <= 1'b0;
    else     level_q <= level;
  end

  assign pulse = level & ~level_q;
endmodule
