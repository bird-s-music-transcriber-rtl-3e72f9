// fontgen_tb: every (note, duration, sharp) combination on a new_note pulse
// must load the expected pair of glyph codes; without new_note the codes
// hold; reset and newpage give two blanks; the clef code is the treble clef.
module fontgen_tb;
  logic clk = 0, rst = 1, newpage = 0, new_note = 0, sharp = 0;
  logic [4:0] note = 0;
  logic [2:0] duration = 0;
  logic [7:0] cstring;
  logic [3:0] clef_code;
  int checks = 0, failures = 0;

  fontgen dut (.clk, .rst, .newpage, .new_note, .note, .duration, .sharp, .cstring, .clef_code);
  always #5 clk = ~clk;

  // Glyph codes: 0 sharp, 1 whole, 2 dotted half, 3 half, 4 quarter,
  // 5 whole rest, 7 half rest, 8 quarter rest, 9 blank, A error.
  function automatic logic [7:0] expect_code(int n, int d, int s);
    if (d < 1 || d > 4) return 8'hAA;
    if (n == 0) case (d) 4: return 8'h59; 3: return 8'h78; 2: return 8'h79; default: return 8'h89; endcase
    case (d)
      4: return s ? 8'h10 : 8'h19;
      3: return s ? 8'h20 : 8'h29;
      2: return s ? 8'h30 : 8'h39;
      default: return s ? 8'h40 : 8'h49;
    endcase
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] last;
    @(posedge clk); #1;
    checks++; if (cstring != 8'h99 || clef_code != 4'h1) failures++;
    rst = 0;
    for (int n = 0; n < 12; n++)
      for (int d = 0; d < 8; d++)
        for (int s = 0; s < 2; s++) begin
          @(negedge clk); note = 5'(n); duration = 3'(d); sharp = 1'(s); new_note = 1;
          @(negedge clk); new_note = 0;
          checks++;
          if (cstring != expect_code(n, d, s)) begin
            failures++; $display("note %0d dur %0d sharp %0d: %h", n, d, s, cstring);
          end
          last = cstring;
          note = 5'($urandom_range(0, 11)); duration = 3'($urandom_range(1, 4));
          @(negedge clk);
          checks++; if (cstring != last) failures++;
        end
    @(negedge clk); newpage = 1; note = 3; duration = 1; new_note = 1;
    @(negedge clk); checks++; if (cstring != 8'h99) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
