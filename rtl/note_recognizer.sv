// note_recognizer: from FFT spectra to timed note events.
//
// Data path (27 MHz domain): the codec's ready level becomes a one-cycle
// sample pulse that clock-enables the external FFT core and the spectrum
// scan. The peak detector finds the loudest bin below ~900 Hz in each frame,
// the look-up table turns it into a note number and sharp flag, and the
// rhythm block times each note against the beat length chosen on the tempo
// switches, emitting new_note with note_out, sharp_out and duration. The
// rhythm block's beat pulse drives the metronome LED and beep.
//
// The FFT core itself is not part of this RTL: fft_ce/fft_xn_re go to it and
// its output stream comes back on fft_dv/fft_xk_*. A bin is taken when the
// sample pulse and fft_dv are both high, since the core's outputs advance
// once per enabled clock. note and sharp (the look-up table's current
// output) are brought out for monitoring, as in the design.
module note_recognizer
  import mt_pkg::*;
#(
  parameter logic [BEAT_W-1:0] TEMPOS [8] = '{
    25'd9000000,  25'd13000000, 25'd15000000, 25'd17000000,
    25'd22000000, 25'd25000000, 25'd27000000, 25'd33500000},
  parameter int unsigned SCAN_BINS = 77,
  parameter int unsigned MIN_MAG   = 100
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [2:0]        tempo_sw,
  // codec
  input  logic              ac97_ready,
  input  logic [7:0]        ac97_data,
  // FFT core
  output logic              fft_ce,
  output logic [7:0]        fft_xn_re,
  input  logic              fft_dv,
  input  logic [FFT_LOG-1:0] fft_xk_index,
  input  logic signed [7:0] fft_xk_re,
  input  logic signed [7:0] fft_xk_im,
  // results
  output logic [FFT_LOG-1:0] peak_index,
  output note_t             note,
  output logic              sharp,
  output note_t             note_out,
  output logic              sharp_out,
  output dur_t              duration,
  output logic              new_note,
  output logic              beat,
  output logic              led_beat,
  output logic              beep
);
  logic              ready_pulse, peak_valid;
  logic [BEAT_W-1:0] beat_len;

  level_to_pulse u_l2p (.clk, .rst, .level(ac97_ready), .pulse(ready_pulse));

  assign fft_ce    = ready_pulse;
  assign fft_xn_re = ac97_data;

  peak_detector #(.IDX_W(FFT_LOG), .DW(8), .SCAN_BINS(SCAN_BINS), .MIN_MAG(MIN_MAG)) u_peak (
    .clk, .rst, .in_valid(ready_pulse & fft_dv), .xk_index(fft_xk_index),
    .xk_re(fft_xk_re), .xk_im(fft_xk_im), .peak_index, .peak_valid);

  note_lut #(.IDX_W(FFT_LOG)) u_lut (.clk, .rst, .peak_valid, .peak_index, .note, .sharp);

  tempo_select #(.TEMPOS(TEMPOS)) u_tempo (.clk, .rst, .sw(tempo_sw), .beat_len);

  rhythm u_rhythm (.clk, .rst, .beat_len, .note, .sharp, .note_out, .sharp_out,
                   .duration, .new_note, .beat);

  metronome u_metro (.clk, .rst, .beat, .led(led_beat), .beep);
endmodule
