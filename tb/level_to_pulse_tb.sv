// level_to_pulse_tb: random ready levels; the pulse must be high exactly on
// the first cycle the level is seen high after being low.
module level_to_pulse_tb;
  logic clk = 0, rst = 1, level = 0, pulse;
  int checks = 0, failures = 0;
  logic prev;

  level_to_pulse dut (.clk, .rst, .level, .pulse);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int npulse = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    prev = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      level = ($urandom_range(0, 3) != 0) ? ~level : level;
      #1;
      checks++;
      if (pulse !== (level & ~prev)) begin
        failures++;
        $display("mismatch at %0d: level=%b prev=%b pulse=%b", i, level, prev, pulse);
      end
      npulse += pulse;
      @(posedge clk);
      prev = level;
    end
    checks++;
    if (npulse == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
