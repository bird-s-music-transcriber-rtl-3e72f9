// note_recognizer_tb: plays a tune through a stand-in FFT (pure tones at
// Table frequencies, 128-bin frames, one codec sample every 4 clocks) with a
// short tempo, and checks the stream of note events: pitch, sharp and
// duration in beats. Also checks the tempo switches set the beat period and
// that the metronome level toggles on each beat.
module note_recognizer_tb;
  localparam int BEAT = 4000;   // clocks per beat for tempo 0
  localparam logic [24:0] TEMPOS [8] = '{25'(BEAT), 25'(2 * BEAT), 25'd300, 25'd400,
                                         25'd500, 25'd600, 25'd700, 25'd800};
  logic clk = 0, rst = 1;
  logic [2:0] tempo_sw = 0;
  logic ac97_ready = 0;
  logic [7:0] ac97_data = 0;
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
    .clk, .rst, .tempo_sw, .ac97_ready, .ac97_data, .fft_ce, .fft_xn_re, .fft_dv,
    .fft_xk_index, .fft_xk_re, .fft_xk_im, .peak_index, .note, .sharp, .note_out,
    .sharp_out, .duration, .new_note, .beat, .led_beat, .beep);

  fft_stream_model #(.FRAME(128)) fft (.clk, .ce(fft_ce), .bin, .amp, .dv(fft_dv),
                                       .xk_index(fft_xk_index), .xk_re(fft_xk_re), .xk_im(fft_xk_im));

  always #5 clk = ~clk;

  // codec: ready high for 2 of every 4 clocks
  int phase = 0;
  always @(posedge clk) begin
    phase <= (phase + 1) % 4;
    ac97_ready <= (phase < 2);
    ac97_data <= 8'($urandom);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tune: bin of the tone (0 = silence), expected note, sharp, beats
  typedef struct { int b; int n; int s; int beats; } tone_t;
  tone_t tune[8] = '{'{38, 5, 0, 2}, '{47, 7, 1, 1}, '{0, 0, 0, 3}, '{56, 9, 0, 4},
                     '{32, 3, 1, 2}, '{67, 11, 0, 1}, '{25, 1, 0, 3}, '{38, 5, 0, 2}};
  int ev = 0, led_flips = 0, beats_seen = 0, xn_ok = 0;
  logic led_q = 0;

  always @(posedge clk) if (!rst) begin
    if (led_beat != led_q) led_flips++;
    led_q <= led_beat;
    if (beat) beats_seen++;
    if (fft_ce) xn_ok += (fft_xn_re == ac97_data);
  end

  always @(posedge clk) if (!rst && new_note) begin
    // the first event is the silence before the tune
    if (ev == 0) begin
      checks++;
      if (note_out != 0) begin failures++; $display("first event note %0d", note_out); end
    end else if (ev <= 7) begin
      checks++;
      if (note_out != 5'(tune[ev-1].n) || sharp_out != 1'(tune[ev-1].s) ||
          duration != 3'(tune[ev-1].beats)) begin
        failures++;
        $display("event %0d: note %0d sharp %0d dur %0d, expected %0d %0d %0d", ev,
                 note_out, sharp_out, duration, tune[ev-1].n, tune[ev-1].s, tune[ev-1].beats);
      end
    end
    ev++;
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (BEAT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      bin = tune[i].b; amp = (tune[i].b == 0) ? 0 : 60;
      repeat (tune[i].beats * BEAT) @(posedge clk);
    end
    bin = 0; amp = 0;
    repeat (2 * BEAT) @(posedge clk);
    checks++;
    if (ev < 8) begin failures++; $display("only %0d events", ev); end
    // beat period for tempo 1 (2*BEAT): two consecutive beats
    tempo_sw = 3'd1;
    @(posedge beat); @(negedge clk);
    t0 = $time;
    @(posedge beat); @(negedge clk);
    t1 = $time;
    checks++;
    if ((t1 - t0) / 10 != 2 * BEAT + 1) begin failures++; $display("beat period %0d", (t1 - t0) / 10); end
    checks++;
    if (led_flips != beats_seen || beats_seen == 0) begin
      failures++; $display("led flips %0d beats %0d", led_flips, beats_seen);
    end
    checks++;
    if (xn_ok == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
