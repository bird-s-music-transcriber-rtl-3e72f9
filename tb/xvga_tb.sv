// xvga_tb: runs two full frames and checks the raster: 1344 pixels per line,
// 806 lines per frame, hsync low exactly for hcount 1048..1183, vsync low
// exactly for vcount 777..782, blank exactly outside 1024x768, hreset on
// the last pixel of each line, and the frame length in clocks.
module xvga_tb;
  logic clk = 0;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic hsync, vsync, blank, hreset;
  int checks = 0, failures = 0;

  xvga dut (.clk, .hcount, .vcount, .hsync, .vsync, .blank, .hreset);
  always #5 clk = ~clk;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, frames = 0, bad = 0;
    logic [10:0] ph;
    logic [9:0] pv;
    // let the counters reach the start of a frame
    do begin @(posedge clk); #1; end while (!(hcount == 0 && vcount == 0));
    t0 = 0;
    ph = hcount; pv = vcount;
    for (int t = 1; t <= 2 * 1344 * 806; t++) begin
      @(posedge clk); #1;
      // step
      if (ph == 1343) begin
        if (hcount != 0) bad++;
        if (vcount != ((pv == 805) ? 10'd0 : pv + 1)) bad++;
      end else if (hcount != ph + 1 || vcount != pv) bad++;
      if (hsync != !(hcount >= 1048 && hcount < 1184)) bad++;
      if (vsync != !(vcount >= 777 && vcount < 783)) bad++;
      if (blank != (hcount >= 1024 || vcount >= 768)) bad++;
      if (hreset != (hcount == 1343)) bad++;
      if (hcount == 0 && vcount == 0) begin
        frames++;
        checks++;
        if (t != frames * 1344 * 806) begin failures++; $display("frame %0d ended at %0d", frames, t); end
      end
      ph = hcount; pv = vcount;
    end
    checks++;
    if (bad != 0) begin failures++; $display("%0d raster errors", bad); end
    checks++;
    if (frames != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
