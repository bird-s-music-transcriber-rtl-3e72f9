// transcriber_top_tb: end-to-end run of the transcriber with a short tempo
// table, a short button debounce and a 128-bin stand-in FFT.
//
// Phase 1 (slow tempo, one beat longer than a video frame): a rest and
// three notes, one of them sharp, are played as pure tones. Each note event
// must carry the right pitch, sharp and length, and the video memory must
// then show the note's glyphs where the page layout puts them.
// Phase 2 (tempo switched to a fast tempo): a glitch shorter than half a
// beat, a note held for 9 beats and a long random tune fill the page, which
// must wrap to new staves and finally stall with page_full.
// Phase 3: the reset button clears the page and the staves come back.
// Every mechanism is counted and must happen at least once.
module transcriber_top_tb;
  localparam int FRAME_V = 1344 * 806;       // pixel clocks per video frame
  localparam int SLOW = 512 * 1000;          // clocks per beat, tempo 0
  localparam int FAST = 2048;                // clocks per beat, tempo 1
  localparam logic [24:0] TEMPOS [8] = '{25'(SLOW), 25'(FAST), 25'(FAST), 25'(FAST),
                                         25'(FAST), 25'(FAST), 25'(FAST), 25'(FAST)};
  logic clk27 = 0, clk65 = 0, reset_btn = 1;
  logic [2:0] tempo_sw = 0;
  logic ac97_ready = 0;
  logic [7:0] ac97_data = 0;
  logic fft_ce, fft_dv, led_beat, beep, vga_hsync, vga_vsync, vga_blank, sharp_now, page_full;
  logic [7:0] fft_xn_re;
  logic [11:0] fft_xk_index;
  logic signed [7:0] fft_xk_re, fft_xk_im;
  logic [2:0] vga_rgb;
  logic [4:0] note_now;
  int bin = 0, amp = 0;
  int checks = 0, failures = 0;
  logic [7:0] font [192];

  transcriber_top #(.TEMPOS(TEMPOS), .DEBOUNCE_CYCLES(100)) dut (
    .clk27, .clk65, .reset_btn, .tempo_sw, .ac97_ready, .ac97_data, .fft_ce, .fft_xn_re,
    .fft_dv, .fft_xk_index, .fft_xk_re, .fft_xk_im, .led_beat, .beep, .vga_rgb, .vga_hsync,
    .vga_vsync, .vga_blank, .note_now, .sharp_now, .page_full);

  fft_stream_model #(.FRAME(128)) fft (.clk(clk27), .ce(fft_ce), .bin, .amp, .dv(fft_dv),
                                       .xk_index(fft_xk_index), .xk_re(fft_xk_re), .xk_im(fft_xk_im));

  always #18.5 clk27 = ~clk27;
  always #7.7 clk65 = ~clk65;

  int phase = 0;
  always @(posedge clk27) begin
    phase <= (phase + 1) % 4;
    ac97_ready <= (phase < 2);
    ac97_data <= 8'($urandom);
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_dur[5], n_sharp = 0, n_rest = 0, n_wrap = 0, n_beat = 0, n_led = 0, n_glitch = 0;
  int n_g5 = 0;
  int n_events = 0, n_clear = 0, n_tempo = 0, n_full = 0;
  logic led_q = 0;
  logic rst27_q = 1;
  logic [9:0] cyf_q = 0;
  bit started = 0;
  always @(posedge clk27) if (started) begin
    if (dut.u_rec.new_note) begin
      n_events++;
      if (dut.u_rec.duration <= 4) n_dur[dut.u_rec.duration]++;
      if (dut.u_rec.sharp_out) n_sharp++;
      if (dut.u_rec.note_out == 0) n_rest++;
      if (dut.u_rec.note_out == 11) n_g5++;
    end
    // a change of pitch that comes before half a beat has passed
    if ({dut.u_rec.note, dut.u_rec.sharp} != {dut.u_rec.u_rhythm.held_note, dut.u_rec.u_rhythm.held_sharp}
        && dut.u_rec.u_rhythm.count < dut.u_rec.u_rhythm.th1) n_glitch++;
    if (dut.u_rec.beat) n_beat++;
    // reset forces the LED low without a beat: such a change is not counted
    if (led_beat != led_q && !rst27_q) n_led++;
    led_q <= led_beat;
    rst27_q <= dut.rst27;
    if (dut.u_vid.u_ctrl.cy_fixed > cyf_q && cyf_q != 0 && !page_full) n_wrap++;
    cyf_q <= dut.u_vid.u_ctrl.cy_fixed;
  end

  function automatic bit px(int x, int y);
    return dut.u_vid.u_ram.mem[y * 1024 + x];
  endfunction

  function automatic int missing(int x0, int y0, logic [7:0] cs);
    int m = 0;
    for (int y = 0; y < 24; y++)
      for (int x = 0; x < 32; x++) begin
        int g = (x < 16) ? int'(cs[7:4]) : int'(cs[3:0]);
        if (x0 + x < 1024 && font[g * 12 + y / 2][7 - (x % 16) / 2] && !px(x0 + x, y0 + y)) m++;
      end
    return m;
  endfunction

  function automatic int count_set();
    int c = 0;
    for (int a = 0; a < 1024 * 768; a++) c += dut.u_vid.u_ram.mem[a];
    return c;
  endfunction

  task automatic play(input int b, input int clocks);
    bin = b; amp = (b == 0) ? 0 : 60;
    repeat (clocks) @(posedge clk27);
  endtask

  // Phase-1 expectations: events in order (note, sharp, beats, glyph pair).
  typedef struct { int n; int s; int d; logic [7:0] cs; } ev_t;
  ev_t exp_ev[4] = '{'{0, 0, 1, 8'h89}, '{5, 0, 2, 8'h39}, '{7, 1, 1, 8'h40}, '{9, 0, 3, 8'h29}};
  int ev_i = 0;
  always @(posedge clk27) if (started && dut.u_rec.new_note && ev_i < 4 && tempo_sw == 0) begin
    checks++;
    if (dut.u_rec.note_out != 5'(exp_ev[ev_i].n) || dut.u_rec.sharp_out != 1'(exp_ev[ev_i].s) ||
        dut.u_rec.duration != 3'(exp_ev[ev_i].d)) begin
      failures++;
      $display("event %0d: %0d/%0d dur %0d", ev_i, dut.u_rec.note_out, dut.u_rec.sharp_out,
               dut.u_rec.duration);
    end
    ev_i++;
  end

  initial begin
    int x, m, c0, c1;
    $readmemh("rtl/note_font.hex", font);
    // hold the button for more than one video frame to clear the page
    repeat (FRAME_V + 2000) @(posedge clk65);
    started = 1;
    reset_btn = 0;
    repeat (200) @(posedge clk27);
    checks++;
    c0 = count_set();
    if (c0 != 0) begin failures++; $display("page not clear: %0d pixels", c0); end else n_clear++;

    // ---- phase 1: rest 1 beat, A4 2 beats, C#5 1 beat, E5 3 beats, rest
    play(0, SLOW);
    play(38, 2 * SLOW);
    play(47, SLOW);
    play(56, 3 * SLOW);
    play(0, 2 * SLOW);
    checks++;
    if (ev_i < 4) begin failures++; $display("only %0d phase-1 events", ev_i); end
    x = 35;
    for (int i = 0; i < 4; i++) begin
      automatic int y = (exp_ev[i].n == 0) ? 80 - 20 : 80 - 4 * exp_ev[i].n;
      m = missing(x, y, exp_ev[i].cs);
      checks++;
      if (m != 0) begin failures++; $display("phase 1 note %0d at (%0d,%0d): %0d pixels missing", i, x, y, m); end
      x += 30 * exp_ev[i].d;
    end

    // ---- phase 2: fast tempo
    tempo_sw = 3'd1;
    n_tempo++;
    play(0, 4 * FAST);
    begin
      n_g5 = 0;
      play(38, 2 * FAST);
      play(67, FAST / 4);            // glitch
      play(38, 2 * FAST);
      play(0, 2 * FAST);
      // A4 (2 beats), a short G5 that must not become an event, A4 (2 beats)
      checks++;
      if (n_g5 != 0) begin failures++; $display("glitch reported as a note"); end
    end
    play(25, 9 * FAST);              // long note: whole notes chained
    while (!page_full && n_events < 2000) begin
      automatic int tone[8] = '{0, 25, 32, 38, 47, 56, 67, 44};
      play(tone[$urandom_range(0, 7)], FAST * $urandom_range(1, 4));
    end
    play(0, 2 * FAST);
    if (page_full) n_full++;
    // the stalled page stays as it is
    repeat (FRAME_V) @(posedge clk65);
    c0 = count_set();
    play(38, 3 * FAST); play(0, 3 * FAST);
    repeat (FRAME_V + 2000) @(posedge clk65);
    c1 = count_set();
    checks++;
    if (c1 != c0) begin failures++; $display("page changed after stall: %0d -> %0d", c0, c1); end

    // ---- phase 3: reset button clears the page, staves come back
    reset_btn = 1;
    repeat (FRAME_V + 2000) @(posedge clk65);
    c0 = count_set();
    reset_btn = 0;
    repeat (FRAME_V + 2000) @(posedge clk65);
    checks++;
    if (c0 != 0 || page_full) begin failures++; $display("reset left %0d pixels", c0); end else n_clear++;
    m = 0;
    for (int xx = 0; xx < 1024; xx++) m += int'(px(xx, 55)) + int'(px(xx, 707));
    checks++;
    if (m != 2048) begin failures++; $display("staves after reset: %0d", m); end

    // ---- mechanisms
    $display("events %0d: dur1 %0d dur2 %0d dur3 %0d dur4 %0d, sharp %0d, rest %0d, glitch %0d",
             n_events, n_dur[1], n_dur[2], n_dur[3], n_dur[4], n_sharp, n_rest, n_glitch);
    $display("wraps %0d, page full %0d, clears %0d, beats %0d, led flips %0d, tempo changes %0d",
             n_wrap, n_full, n_clear, n_beat, n_led, n_tempo);
    for (int d = 1; d <= 4; d++) begin checks++; if (n_dur[d] == 0) failures++; end
    checks += 8;
    if (n_sharp == 0) failures++;
    if (n_rest == 0) failures++;
    if (n_glitch == 0) failures++;
    if (n_wrap < 10) failures++;
    if (n_full == 0) failures++;
    if (n_clear < 2) failures++;
    if (n_beat == 0 || n_led != n_beat) failures++;
    if (n_tempo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
