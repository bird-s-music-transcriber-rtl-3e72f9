// metronome: the beat indicator for the musician.
//
// Each one-cycle beat pulse flips an "up-down" level, so the level changes
// once per beat: it lights the LED on every other beat and, sent to the
// codec as a square wave, gives an audible click on every beat. Reset clears
// the level. The toggle is the design's; driving the LED and the beep from
// the same level is this implementation's reading of it.
module metronome (
  input  logic clk,
  input  logic rst,
  input  logic beat,
  output logic led,
  output logic beep
);
  logic level;

  always_ff @(posedge clk) begin
    if (rst)       level <= 1'b0;
    else if (beat) level <= ~level;
  end

  assign led  = level;
  assign beep = level;
endmodule
