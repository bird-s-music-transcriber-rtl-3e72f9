// display_control_tb: feeds notes and rests of random durations until the
// page is full and beyond, and checks after every note the sprite position,
// the clef position and newpage against the page layout: 11 staves whose
// reference rows are 80 + 62k, notes 4 rows per step above that reference
// (rests 20 rows above it), 30 pixels of advance per beat of the previous
// note, a new stave once a note has been placed at x >= 900, and the
// sprites parked at (1030, 750) once the last stave is full.
module display_control_tb;
  logic clk = 0, rst = 1, new_note = 0;
  logic [4:0] note = 0;
  logic [2:0] duration = 0;
  logic [10:0] cx, xclef;
  logic [9:0] cy, yclef;
  logic newpage;
  int checks = 0, failures = 0;
  int wraps = 0, parks = 0;

  display_control dut (.clk, .rst, .new_note, .note, .duration, .cx, .cy, .xclef, .yclef, .newpage);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x = 35, line = 0, prev_dur = 0, ex, ey, eyc;
    bit full = 0;
    @(negedge clk); @(negedge clk); rst = 0;
    checks++;
    if (cx != 35 || cy != 80 || xclef != 10 || yclef != 53 || newpage) failures++;
    for (int i = 0; i < 250; i++) begin
      automatic int n = (i % 7 == 3) ? 0 : $urandom_range(1, 11);
      automatic int d = (i < 8) ? 4 : $urandom_range(1, 4);
      if (i == 0) x = 35;
      else if (full || (x >= 900 && line == 10)) begin full = 1; end
      else if (x >= 900) begin x = 35; line++; wraps++; end
      else x = x + 30 * prev_dur;
      prev_dur = d;
      @(negedge clk); note = 5'(n); duration = 3'(d); new_note = 1;
      @(negedge clk); new_note = 0;
      ey  = (n == 0) ? 80 + 62 * line - 20 : 80 + 62 * line - 4 * n;
      eyc = 80 + 62 * line - 27;
      ex  = x;
      if (full) begin ex = 1030; ey = 750; parks++; end
      checks++;
      if (cx != 11'(ex) || cy != 10'(ey) || xclef != 10 || (!full && yclef != 10'(eyc)) || newpage != full) begin
        failures++;
        $display("note %0d: cx=%0d cy=%0d yclef=%0d np=%b, expected %0d %0d %0d %b",
                 i, cx, cy, yclef, newpage, ex, ey, eyc, full);
      end
      // no change without new_note
      repeat (3) @(negedge clk);
      checks++;
      if (cx != 11'(ex) || cy != 10'(ey)) failures++;
    end
    checks += 2;
    if (wraps < 10) begin failures++; $display("only %0d line wraps", wraps); end
    if (parks == 0) begin failures++; $display("page never filled"); end
    // reset starts a new page
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    checks++;
    if (cx != 35 || cy != 80 || yclef != 53 || newpage) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
