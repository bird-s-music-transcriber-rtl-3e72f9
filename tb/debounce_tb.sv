// debounce_tb: with a 20-cycle delay, bursts of bouncing must not reach the
// output, and a level held for longer must appear after DELAY+1 to DELAY+2
// cycles.
module debounce_tb;
  localparam int D = 20;
  logic clk = 0, rst = 1, noisy = 0, clean;
  int checks = 0, failures = 0;

  debounce #(.DELAY(D)) dut (.clk, .rst, .noisy, .clean);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic level = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 40; t++) begin
      // bounce: random toggles, each shorter than the delay
      repeat ($urandom_range(1, 6)) begin
        @(negedge clk) noisy = ~noisy;
        repeat ($urandom_range(0, D - 4)) begin
          @(negedge clk);
          checks++; if (clean != level) begin failures++; $display("glitch passed at t=%0d", t); end
        end
      end
      @(negedge clk) noisy = level;
      @(negedge clk);
      checks++; if (clean != level) failures++;
      // settle on a new level
      @(negedge clk) noisy = ~level;
      for (int c = 1; c <= D + 3; c++) begin
        @(negedge clk);
        if (c <= D) begin checks++; if (clean != level) failures++; end
      end
      checks++;
      if (clean != ~level) begin failures++; $display("level not passed at t=%0d", t); end
      level = ~level;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
