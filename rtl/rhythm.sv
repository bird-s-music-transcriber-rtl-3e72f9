// rhythm: measures how long each note lasts, in beats.
//
// A cycle counter runs while the recognised note (note, sharp) stays the
// same. When either input changes, the note that just ended is judged by the
// counter against the beat length L:
//   count <  L/2         too short: treated as a glitch, no event; the new
//                        value is adopted silently and the count restarts
//   count <  3L/2        duration 1 (quarter)
//   count <  5L/2        duration 2 (half)
//   count <  7L/2        duration 3 (dotted half)
//   otherwise            duration 4 (whole)
// If the note does not change for 4L cycles, a whole note is emitted and
// counting starts again, so a long held note becomes a chain of whole notes.
// Each event pulses new_note for one cycle with the finished note on
// note_out/sharp_out and its length on duration; these outputs hold until the
// next event. A separate counter pulses beat for one cycle every L+1 cycles
// (it counts 0..L), the tempo the musician follows.
//
// The rounding rule, the glitch rule and the 4-beat limit are the design's.
// The counter is compared with the registered beat length every cycle, so a
// tempo change takes effect at once.
module rhythm
  import mt_pkg::*;
#(
  parameter int unsigned CNT_W = BEAT_W + 3
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [BEAT_W-1:0] beat_len,
  input  note_t             note,
  input  logic              sharp,
  output note_t             note_out,
  output logic              sharp_out,
  output dur_t              duration,
  output logic              new_note,
  output logic              beat
);
  logic [CNT_W-1:0]  count;
  logic [BEAT_W-1:0] beat_cnt;
  note_t             held_note;
  logic              held_sharp;
  logic [CNT_W-1:0]  len, th1, th2, th3, th4, th_whole;

  always_comb begin
    len      = CNT_W'(beat_len);
    th1      = len >> 1;
    th2      = (3 * len) >> 1;
    th3      = (5 * len) >> 1;
    th4      = (7 * len) >> 1;
    th_whole = len << 2;
  end

  // Beat generator: one-cycle pulse when the beat counter reaches L.
  always_ff @(posedge clk) begin
    if (rst) begin
      beat_cnt <= '0;
      beat     <= 1'b0;
    end else if (beat_cnt >= beat_len) begin
      beat_cnt <= '0;
      beat     <= 1'b1;
    end else begin
      beat_cnt <= beat_cnt + 1'b1;
      beat     <= 1'b0;
    end
  end

  // Duration measurement.
  always_ff @(posedge clk) begin
    if (rst) begin
      count      <= '0;
      held_note  <= '0;
      held_sharp <= 1'b0;
      note_out   <= '0;
      sharp_out  <= 1'b0;
      duration   <= '0;
      new_note   <= 1'b0;
    end else if (note != held_note || sharp != held_sharp) begin
      count      <= '0;
      held_note  <= note;
      held_sharp <= sharp;
      if (count < th1) begin
        new_note <= 1'b0;
      end else begin
        new_note  <= 1'b1;
        note_out  <= held_note;
        sharp_out <= held_sharp;
        if      (count < th2) duration <= DUR_QUARTER;
        else if (count < th3) duration <= DUR_HALF;
        else if (count < th4) duration <= DUR_DOTTED;
        else                  duration <= DUR_WHOLE;
      end
    end else if (count >= th_whole) begin
      count     <= '0;
      new_note  <= 1'b1;
      note_out  <= held_note;
      sharp_out <= held_sharp;
      duration  <= DUR_WHOLE;
    end else begin
      count    <= count + 1'b1;
      new_note <= 1'b0;
    end
  end
endmodule
