// pitch_sweep_tb: the pitch-recognition workload at full FFT size.
//
// A signal generator is imitated by playing pure tones, one at a time, into
// the note recognizer through the stand-in FFT with real 4096-bin frames.
// The tones are the equal-tempered notes from C4 to B5, so they include the
// treble range D4..G#5 and two notes beyond each end. One codec sample is
// taken every 2 clocks, which shortens a frame to 8192 clocks without
// changing what the recognizer sees. Each tone plays for three frames. At
// the end of the third frame the testbench checks three things:
//   * the peak bin equals the tone's bin, round(f * 4096 / 48000), or 0
//     for a bin at or above the scan limit of 77;
//   * the look-up table output gives the note (diatonic steps above C4)
//     and the sharp flag;
//   * tones outside D4..G#5 give note 0.
// Expected values come from a note table typed into this testbench, not from
// the design's package.
module pitch_sweep_tb;
  localparam int FRAME = 4096;
  localparam logic [24:0] TEMPOS [8] = '{25'd50000, 25'd50000, 25'd50000, 25'd50000,
                                         25'd50000, 25'd50000, 25'd50000, 25'd50000};
  logic clk = 0, rst = 1;
  logic ac97_ready = 0;
  logic fft_ce, fft_dv;
  logic [7:0] fft_xn_re;
  logic [11:0] fft_xk_index, peak_index;
  logic signed [7:0] fft_xk_re, fft_xk_im;
  logic [4:0] note, note_out;
  logic sharp, sharp_out, new_note, beat, led_beat, beep;
  logic [2:0] duration;
  int bin = 0, amp = 0;
  int checks = 0, failures = 0;

  note_recognizer #(.TEMPOS(TEMPOS)) dut (
    .clk, .rst, .tempo_sw(3'd0), .ac97_ready, .ac97_data(8'd0), .fft_ce, .fft_xn_re, .fft_dv,
    .fft_xk_index, .fft_xk_re, .fft_xk_im, .peak_index, .note, .sharp, .note_out,
    .sharp_out, .duration, .new_note, .beat, .led_beat, .beep);

  fft_stream_model #(.FRAME(FRAME)) fft (.clk, .ce(fft_ce), .bin, .amp, .dv(fft_dv),
                                         .xk_index(fft_xk_index), .xk_re(fft_xk_re), .xk_im(fft_xk_im));

  always #5 clk = ~clk;
  always @(posedge clk) ac97_ready <= ~ac97_ready;   // a sample every 2 clocks

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // name, frequency in 0.01 Hz, expected note and sharp
  typedef struct { string name; int chz; int n; int s; } tone_t;
  localparam int NT = 24;
  tone_t tones[NT] = '{
    '{"C4", 26163, 0, 0}, '{"C#4", 27718, 0, 0}, '{"D4", 29366, 1, 0}, '{"D#4", 31113, 1, 1},
    '{"E4", 32963, 2, 0}, '{"F4", 34923, 3, 0}, '{"F#4", 36999, 3, 1}, '{"G4", 39200, 4, 0},
    '{"G#4", 41530, 4, 1}, '{"A4", 44000, 5, 0}, '{"A#4", 46616, 5, 1}, '{"B4", 49388, 6, 0},
    '{"C5", 52325, 7, 0}, '{"C#5", 55437, 7, 1}, '{"D5", 58733, 8, 0}, '{"D#5", 62225, 8, 1},
    '{"E5", 65926, 9, 0}, '{"F5", 69846, 10, 0}, '{"F#5", 73999, 10, 1}, '{"G5", 78399, 11, 0},
    '{"G#5", 83061, 11, 1}, '{"A5", 88000, 0, 0}, '{"A#5", 93233, 0, 0}, '{"B5", 98777, 0, 0}};

  initial begin
    automatic int hits = 0;
    repeat (4) @(posedge clk);
    rst = 0;
    amp = 60;
    for (int t = 0; t < NT; t++) begin
      // nearest bin: round(chz * 4096 / 4800000)
      bin = (tones[t].chz * 4096 + 2400000) / 4800000;
      repeat (3 * 2 * FRAME) @(posedge clk);
      @(negedge clk);
      checks += 2;
      // bins from 77 up lie outside the scanned range: the frame reads as silence
      if (peak_index != 12'(bin < 77 ? bin : 0)) begin
        failures++;
        $display("%s: peak bin %0d, expected %0d", tones[t].name, peak_index, bin < 77 ? bin : 0);
      end
      if (note != 5'(tones[t].n) || sharp != 1'(tones[t].s)) begin
        failures++;
        $display("%s (bin %0d): note %0d sharp %0d, expected %0d %0d",
                 tones[t].name, bin, note, sharp, tones[t].n, tones[t].s);
      end else if (tones[t].n != 0) hits++;
    end
    checks++;
    if (hits != 19) begin failures++; $display("%0d of 19 treble notes recognised", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
