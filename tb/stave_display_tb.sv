// stave_display_tb: for every row 0..1023 the pixel must be set exactly on
// the 55 rows of the 11 staves: row 55 + 62*s + 8*l for s = 0..10, l = 0..4.
module stave_display_tb;
  logic [9:0] vcount;
  logic pixel;
  int checks = 0, failures = 0;

  stave_display dut (.vcount, .pixel);

  initial begin
    int lines = 0;
    for (int v = 0; v < 1024; v++) begin
      automatic bit exp_px = 0;
      vcount = 10'(v);
      for (int s = 0; s < 11; s++)
        for (int l = 0; l < 5; l++)
          if (v == 55 + 62 * s + 8 * l) exp_px = 1;
      #1;
      checks++;
      if (pixel != exp_px) begin failures++; $display("row %0d: %b expected %b", v, pixel, exp_px); end
      lines += pixel;
    end
    checks++;
    if (lines != 55) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
