// tempo_select_tb: every switch setting gives its predefined beat length
// one cycle later; reset gives the reset tempo.
module tempo_select_tb;
  logic clk = 0, rst = 1;
  logic [2:0] sw = 0;
  logic [24:0] beat_len;
  int checks = 0, failures = 0;
  int unsigned expv[8] = '{9000000, 13000000, 15000000, 17000000,
                           22000000, 25000000, 27000000, 33500000};

  tempo_select dut (.clk, .rst, .sw, .beat_len);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw = 3'd5;
    @(posedge clk); #1;
    checks++; if (beat_len != 25'd10000000) failures++;
    rst = 0;
    for (int r = 0; r < 3; r++)
      for (int i = 0; i < 8; i++) begin
        int k = (i * 3 + r) % 8;
        @(negedge clk); sw = 3'(k);
        @(posedge clk); #1;
        checks++;
        if (beat_len != 25'(expv[k])) begin
          failures++; $display("sw=%0d beat_len=%0d expected %0d", k, beat_len, expv[k]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
