// transcriber_top: the music transcriber.
//
// A musician picks a tempo on three switches and plays; the design listens
// through an audio codec and an FFT core, recognises the pitch and length of
// every note in beats, and writes it as music notation on staves on a
// 1024x768 monitor, while a metronome LED and beep keep the musician in time.
//
// Clocks and resets: the note recognizer and the tracking half of the
// display run on the 27 MHz clock, the raster and video memory on 65 MHz
// (made from 27 MHz by an FPGA clock manager outside this RTL). The reset
// button is debounced in the 27 MHz domain and synchronised into the
// 65 MHz domain; pressing it clears the page and starts again at the top.
//
// External parts, reached through ports: the codec (ac97_ready level and
// 8-bit sample in, beep out) and a 4096-point streaming FFT core (fft_ce and
// fft_xn_re out; fft_dv, fft_xk_index, fft_xk_re, fft_xk_im in). The FFT
// core must advance its output stream by one bin per fft_ce pulse.
module transcriber_top
  import mt_pkg::*;
#(
  parameter logic [BEAT_W-1:0] TEMPOS [8] = '{
    25'd9000000,  25'd13000000, 25'd15000000, 25'd17000000,
    25'd22000000, 25'd25000000, 25'd27000000, 25'd33500000},
  parameter int unsigned DEBOUNCE_CYCLES = 270000
) (
  input  logic                clk27,
  input  logic                clk65,
  input  logic                reset_btn,
  input  logic [2:0]          tempo_sw,
  input  logic                ac97_ready,
  input  logic [7:0]          ac97_data,
  output logic                fft_ce,
  output logic [7:0]          fft_xn_re,
  input  logic                fft_dv,
  input  logic [FFT_LOG-1:0]  fft_xk_index,
  input  logic signed [7:0]   fft_xk_re,
  input  logic signed [7:0]   fft_xk_im,
  output logic                led_beat,
  output logic                beep,
  output logic [2:0]          vga_rgb,
  output logic                vga_hsync,
  output logic                vga_vsync,
  output logic                vga_blank,
  output note_t               note_now,
  output logic                sharp_now,
  output logic                page_full
);
  logic       rst27, rst65;
  logic [1:0] rst65_sync;

  // The button debouncer samples its own output as its reset value, so it
  // needs no reset of its own.
  debounce #(.DELAY(DEBOUNCE_CYCLES)) u_deb (.clk(clk27), .rst(1'b0), .noisy(reset_btn),
                                             .clean(rst27));

  always_ff @(posedge clk65) rst65_sync <= {rst65_sync[0], rst27};
  assign rst65 = rst65_sync[1];

  note_t               note_out;
  logic                sharp_out, new_note;
  dur_t                duration;

  note_recognizer #(.TEMPOS(TEMPOS)) u_rec (
    .clk(clk27), .rst(rst27), .tempo_sw, .ac97_ready, .ac97_data,
    .fft_ce, .fft_xn_re, .fft_dv, .fft_xk_index, .fft_xk_re, .fft_xk_im,
    .peak_index(), .note(note_now), .sharp(sharp_now), .note_out, .sharp_out, .duration,
    .new_note, .beat(), .led_beat, .beep);

  video_display u_vid (
    .clk27, .rst27, .clk65, .rst65, .new_note, .note(note_out), .duration,
    .sharp(sharp_out), .rgb(vga_rgb), .hsync(vga_hsync), .vsync(vga_vsync),
    .blank(vga_blank), .newpage(page_full));
endmodule
