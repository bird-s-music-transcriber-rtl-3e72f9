// countaddr_tb: visible pixels map to vcount*1024 + hcount; everything
// outside 1024x768 is invisible with address 0.
module countaddr_tb;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic [19:0] addr;
  logic visible;
  int checks = 0, failures = 0;

  countaddr dut (.hcount, .vcount, .addr, .visible);

  task automatic chk(input int h, input int v);
    bit vis = (h < 1024) && (v < 768);
    int a = vis ? v * 1024 + h : 0;
    hcount = 11'(h); vcount = 10'(v);
    #1;
    checks++;
    if (visible != vis || addr != 20'(a)) begin
      failures++; $display("(%0d,%0d): addr %0d vis %b", h, v, addr, visible);
    end
  endtask

  initial begin
    chk(0, 0); chk(1023, 767); chk(1024, 0); chk(0, 768); chk(1343, 805); chk(512, 300);
    for (int i = 0; i < 20000; i++) chk($urandom_range(0, 1343), $urandom_range(0, 805));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
