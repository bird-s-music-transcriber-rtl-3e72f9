// clef_display_tb: places the clef sprite (and, for coverage, other codes)
// at random positions and checks every pixel of a window around it against
// the clef font read by the testbench: 16x24 glyph drawn as 32x48 pixels.
module clef_display_tb;
  logic [10:0] hcount, cx;
  logic [9:0] vcount, cy;
  logic [3:0] code;
  logic pixel;
  logic [15:0] font [384];
  int checks = 0, failures = 0;

  clef_display dut (.hcount, .vcount, .code, .cx, .cy, .pixel);

  initial begin
    int ones = 0;
    $readmemh("rtl/clef_font.hex", font);
    for (int t = 0; t < 24; t++) begin
      automatic int x0 = $urandom_range(0, 980), y0 = $urandom_range(0, 710);
      automatic int bad = 0;
      cx = 11'(x0); cy = 10'(y0);
      code = (t % 3 == 2) ? 4'($urandom) : 4'd1;
      for (int y = y0 - 3; y < y0 + 51; y++)
        for (int x = x0 - 3; x < x0 + 35; x++) begin
          automatic bit e = 0;
          if (x < 0 || y < 0) continue;
          if (x >= x0 && x < x0 + 32 && y >= y0 && y < y0 + 48)
            e = font[int'(code) * 24 + (y - y0) / 2][15 - (x - x0) / 2];
          hcount = 11'(x); vcount = 10'(y);
          #1;
          if (pixel != e) bad++;
          ones += pixel;
        end
      checks++;
      if (bad != 0) begin failures++; $display("clef %0d at (%0d,%0d): %0d wrong pixels", code, x0, y0, bad); end
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
