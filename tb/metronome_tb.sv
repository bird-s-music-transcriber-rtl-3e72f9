// metronome_tb: the LED/beep level must flip on every beat pulse and hold
// otherwise.
module metronome_tb;
  logic clk = 0, rst = 1, beat = 0, led, beep;
  logic expected = 0;
  int checks = 0, failures = 0, flips = 0;

  metronome dut (.clk, .rst, .beat, .led, .beep);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      beat = ($urandom_range(0, 5) == 0);
      @(posedge clk); #1;
      if (beat) begin expected = ~expected; flips++; end
      checks++;
      if (led != expected || beep != expected) failures++;
    end
    checks++; if (flips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
