// video_display_tb: clears the page with a one-frame reset, then sends ten
// notes (27 MHz domain), each followed by a little more than one frame of
// the 65 MHz raster. After each note the video memory must hold the note's
// glyphs at the position worked out from the page layout (and still hold
// every earlier note: the page is never erased), plus the staves and the
// clef. The tenth note must start the second stave. Finally the rgb output
// is sampled on a stave row (black) and on an empty row (white), and a
// second reset must clear the memory.
module video_display_tb;
  logic clk27 = 0, clk65 = 0, rst27 = 1, rst65 = 1;
  logic new_note = 0, sharp = 0;
  logic [4:0] note = 0;
  logic [2:0] duration = 0;
  logic [2:0] rgb;
  logic hsync, vsync, blank, newpage;
  logic [7:0] font [192];
  logic [15:0] clef [384];
  int checks = 0, failures = 0;

  video_display dut (.clk27, .rst27, .clk65, .rst65, .new_note, .note, .duration, .sharp,
                     .rgb, .hsync, .vsync, .blank, .newpage);

  always #18.5 clk27 = ~clk27;
  always #7.7 clk65 = ~clk65;

  localparam int FRAME = 1344 * 806;

  initial begin
    #400_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit px(int x, int y);
    return dut.u_ram.mem[y * 1024 + x];
  endfunction

  // Glyph pair for a note, as chosen by the font generator.
  function automatic logic [7:0] code_of(int n, int d, int s);
    if (n == 0) case (d) 4: return 8'h59; 3: return 8'h78; 2: return 8'h79; default: return 8'h89; endcase
    case (d) 4: return s ? 8'h10 : 8'h19; 3: return s ? 8'h20 : 8'h29;
             2: return s ? 8'h30 : 8'h39; default: return s ? 8'h40 : 8'h49; endcase
  endfunction

  // Count glyph pixels of the sprite at (x0, y0) missing from memory.
  function automatic int missing(int x0, int y0, logic [7:0] cs);
    int m = 0;
    for (int y = 0; y < 24; y++)
      for (int x = 0; x < 32; x++) begin
        int g = (x < 16) ? int'(cs[7:4]) : int'(cs[3:0]);
        if (x0 + x < 1024 && font[g * 12 + y / 2][7 - (x % 16) / 2] && !px(x0 + x, y0 + y)) m++;
      end
    return m;
  endfunction

  int xs[10], ys[10];
  logic [7:0] cs[10];

  initial begin
    int x = 35, line = 0, prev_dur = 0, m, set;
    $readmemh("rtl/note_font.hex", font);
    $readmemh("rtl/clef_font.hex", clef);
    repeat (FRAME + 2000) @(posedge clk65);
    @(negedge clk27) rst27 = 0;
    @(negedge clk65) rst65 = 0;
    // cleared page: no pixel set on a row between staves
    set = 0;
    for (int xx = 0; xx < 1024; xx++) set += px(xx, 30);
    checks++; if (set != 0) begin failures++; $display("page not cleared"); end
    for (int i = 0; i < 10; i++) begin
      automatic int n = 1 + (i * 5) % 11;
      automatic int s = i % 2;
      automatic int d = 4;
      if (i > 0) begin
        if (x >= 900) begin x = 35; line++; end
        else x = x + 30 * prev_dur;
      end
      prev_dur = d;
      xs[i] = x; ys[i] = 80 + 62 * line - 4 * n; cs[i] = code_of(n, d, s);
      @(negedge clk27); note = 5'(n); sharp = 1'(s); duration = 3'(d); new_note = 1;
      @(negedge clk27); new_note = 0;
      repeat (FRAME + 3000) @(posedge clk65);
      for (int j = 0; j <= i; j++) begin
        m = missing(xs[j], ys[j], cs[j]);
        checks++;
        if (m != 0) begin failures++; $display("after note %0d: note %0d at (%0d,%0d) misses %0d pixels", i, j, xs[j], ys[j], m); end
      end
    end
    checks++;
    if (line != 1) begin failures++; $display("no line wrap"); end
    // staves: rows 55 and 117 fully set, clef pixels present on both staves
    set = 0;
    for (int xx = 0; xx < 1024; xx++) set += px(xx, 55) + px(xx, 117 + 32);
    checks++; if (set != 2048) begin failures++; $display("stave rows: %0d of 2048 pixels", set); end
    m = 0;
    for (int k = 0; k < 2; k++)
      for (int y = 0; y < 48; y++)
        for (int xx = 0; xx < 32; xx++)
          if (clef[24 + y / 2][15 - xx / 2] && !px(10 + xx, 53 + 62 * k + y)) m++;
    checks++; if (m != 0) begin failures++; $display("clef misses %0d pixels", m); end
    // rgb: follow the raster; output is two pixel clocks behind xvga
    begin
      int blacks = 0, whites = 0, wrong = 0;
      logic [10:0] h1, h2; logic [9:0] v1, v2;
      repeat (FRAME) begin
        @(posedge clk65); #1;
        if (!(h2 >= 1024 || v2 >= 768)) begin
          if (px(h2, v2)) begin blacks++; if (rgb != 3'b000) wrong++; end
          else begin whites++; if (rgb != 3'b111) wrong++; end
        end else if (rgb != 3'b000 || !blank) wrong++;
        h2 = h1; v2 = v1; h1 = dut.hcount; v1 = dut.vcount;
      end
      checks++;
      if (wrong > 4 || blacks == 0 || whites == 0) begin
        failures++; $display("rgb: %0d wrong, %0d black, %0d white", wrong, blacks, whites);
      end
    end
    // reset clears the page; staves come back within a frame after release
    @(negedge clk27) rst27 = 1;
    @(negedge clk65) rst65 = 1;
    repeat (FRAME + 2000) @(posedge clk65);
    m = missing(xs[0], ys[0], cs[0]);
    checks++; if (m == 0) begin failures++; $display("reset did not clear note 0"); end
    @(negedge clk27) rst27 = 0;
    @(negedge clk65) rst65 = 0;
    repeat (FRAME + 2000) @(posedge clk65);
    set = 0;
    for (int xx = 0; xx < 1024; xx++) set += px(xx, 55);
    checks++; if (set != 1024) begin failures++; $display("staves not redrawn"); end
    set = 0;
    for (int xx = 0; xx < 1024; xx++) set += px(xx, 30);
    checks++; if (set != 0) begin failures++; $display("row 30 not empty after reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
