// transcriber_full_tb: the transcriber at its real sizes and timing: 10 ms
// button debounce, the slowest-to-fastest tempo table (tempo 0: 9,000,000
// clocks per beat), a 48 kHz codec sample rate from the 27 MHz clock and a
// full 4096-bin stand-in FFT. After a page reset, a rest of one beat, an A4
// of two beats and a C#5 of one beat are played. The note events must be
// exactly those, the metronome must beat every 9,000,001 clocks, and the
// video memory must show each note's glyphs where the page layout puts them.
module transcriber_full_tb;
  localparam int FRAME_V = 1344 * 806;
  localparam int BEAT = 9000000;
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

  transcriber_top dut (
    .clk27, .clk65, .reset_btn, .tempo_sw, .ac97_ready, .ac97_data, .fft_ce, .fft_xn_re,
    .fft_dv, .fft_xk_index, .fft_xk_re, .fft_xk_im, .led_beat, .beep, .vga_rgb, .vga_hsync,
    .vga_vsync, .vga_blank, .note_now, .sharp_now, .page_full);

  fft_stream_model #(.FRAME(4096)) fft (.clk(clk27), .ce(fft_ce), .bin, .amp, .dv(fft_dv),
                                        .xk_index(fft_xk_index), .xk_re(fft_xk_re), .xk_im(fft_xk_im));

  always #18.5 clk27 = ~clk27;
  always #7.7 clk65 = ~clk65;

  // codec: 48 kHz ready from 27 MHz (1125 clocks per two samples)
  int ph = 0;
  always @(posedge clk27) begin
    ph <= (ph + 1) % 1125;
    ac97_ready <= (ph < 281) || (ph >= 562 && ph < 843);
    ac97_data <= 8'($urandom);
  end

  initial begin
    #500_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
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

  typedef struct { int n; int s; int d; logic [7:0] cs; } ev_t;
  ev_t exp_ev[3] = '{'{0, 0, 1, 8'h89}, '{5, 0, 2, 8'h39}, '{7, 1, 1, 8'h40}};
  int ev_i = 0;
  bit started = 0;
  always @(posedge clk27) if (started && dut.u_rec.new_note) begin
    checks++;
    if (ev_i > 2 || dut.u_rec.note_out != 5'(exp_ev[ev_i].n) ||
        dut.u_rec.sharp_out != 1'(exp_ev[ev_i].s) || dut.u_rec.duration != 3'(exp_ev[ev_i].d)) begin
      failures++;
      $display("event %0d: %0d/%0d dur %0d", ev_i, dut.u_rec.note_out, dut.u_rec.sharp_out,
               dut.u_rec.duration);
    end
    ev_i++;
  end

  longint last_beat = -1, cyc = 0;
  int beats = 0;
  always @(posedge clk27) begin
    cyc <= cyc + 1;
    if (started && dut.u_rec.beat) begin
      if (last_beat >= 0 && beats < 1000) begin
        checks++;
        if (cyc - last_beat != BEAT + 1) begin failures++; $display("beat period %0d", cyc - last_beat); end
      end
      last_beat = cyc;
      beats++;
    end
  end

  task automatic play(input int b, input int clocks);
    bin = b; amp = (b == 0) ? 0 : 60;
    repeat (clocks) @(posedge clk27);
  endtask

  initial begin
    int x, m;
    $readmemh("rtl/note_font.hex", font);
    repeat (2 * FRAME_V) @(posedge clk65);
    started = 1;
    reset_btn = 0;
    repeat (300000) @(posedge clk27);
    play(0, BEAT);
    play(38, 2 * BEAT);
    play(47, BEAT);
    play(0, BEAT);
    repeat (FRAME_V + 2000) @(posedge clk65);
    checks++;
    if (ev_i != 3) begin failures++; $display("%0d events", ev_i); end
    x = 35;
    for (int i = 0; i < 3; i++) begin
      automatic int y = (exp_ev[i].n == 0) ? 80 - 20 : 80 - 4 * exp_ev[i].n;
      m = missing(x, y, exp_ev[i].cs);
      checks++;
      if (m != 0) begin failures++; $display("note %0d at (%0d,%0d): %0d pixels missing", i, x, y, m); end
      x += 30 * exp_ev[i].d;
    end
    checks++;
    if (beats < 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
