// note_display_tb: places the note sprite at random positions with random
// glyph pairs and checks every pixel of a window around it against the font
// image read by the testbench: each font pixel must appear as a 2x2 block,
// left glyph from cstring[7:4], right glyph from cstring[3:0], and nothing
// outside the 32x24 box.
module note_display_tb;
  logic [10:0] hcount, cx;
  logic [9:0] vcount, cy;
  logic [7:0] cstring;
  logic pixel;
  logic [7:0] font [192];
  int checks = 0, failures = 0;

  note_display dut (.hcount, .vcount, .cstring, .cx, .cy, .pixel);

  initial begin
    int ones = 0;
    $readmemh("rtl/note_font.hex", font);
    for (int t = 0; t < 40; t++) begin
      automatic int x0 = $urandom_range(0, 980), y0 = $urandom_range(0, 730);
      automatic int bad = 0;
      cx = 11'(x0); cy = 10'(y0);
      cstring = (t < 16) ? {4'(t), 4'(15 - t)} : 8'($urandom);
      for (int y = y0 - 3; y < y0 + 27; y++)
        for (int x = x0 - 3; x < x0 + 35; x++) begin
          automatic bit e = 0;
          if (x >= x0 && x < x0 + 32 && y >= y0 && y < y0 + 24) begin
            automatic int g = (x - x0 < 16) ? int'(cstring[7:4]) : int'(cstring[3:0]);
            automatic int col = ((x - x0) % 16) / 2, row = (y - y0) / 2;
            e = font[g * 12 + row][7 - col];
          end
          if (x < 0 || y < 0) continue;
          hcount = 11'(x); vcount = 10'(y);
          #1;
          if (pixel != e) bad++;
          ones += pixel;
        end
      checks++;
      if (bad != 0) begin failures++; $display("sprite %0d (%0d,%0d) %h: %0d wrong pixels", t, x0, y0, cstring, bad); end
    end
    checks++;
    if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
