// videoram_tb: fills the full 1024x768 memory with a pattern, reads it all
// back (read data one cycle after the address), then does random
// read/write traffic against a model array. Writes beyond the last word
// must be dropped.
module videoram_tb;
  localparam int DEPTH = 1024 * 768;
  logic clk = 0, we = 0, din = 0, dout;
  logic [19:0] raddr = 0, waddr = 0;
  int checks = 0, failures = 0;
  bit model [DEPTH];

  videoram dut (.clk, .raddr, .dout, .we, .waddr, .din);
  always #5 clk = ~clk;

  function automatic bit pat(int a);
    return bit'(((a * 7) >> 3) ^ (a >> 11));
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 20'(a); din = pat(a); model[a] = pat(a);
    end
    @(negedge clk); we = 1; waddr = 20'(DEPTH); din = 1;   // out of range
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); raddr = 20'(a);
      @(posedge clk); #1;
      if (dout != model[a]) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("%0d read errors after fill", bad); end
    for (int i = 0; i < 20000; i++) begin
      automatic int ra = $urandom_range(0, DEPTH - 1);
      automatic int wa = $urandom_range(0, DEPTH - 1);
      automatic bit w = 1'($urandom_range(0, 1));
      automatic bit d = 1'($urandom_range(0, 1));
      automatic bit expv = model[ra];
      @(negedge clk); raddr = 20'(ra); waddr = 20'(wa); we = w; din = d;
      @(posedge clk); #1;
      if (w) model[wa] = d;
      checks++;
      if (dout != expv) begin failures++; $display("read %0d: %b expected %b", ra, dout, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
