// peak_detector_tb: streams frames of random spectra (with a strong bin, a
// silent frame, and spikes just outside the scanned range) and compares the
// published peak with a software search done in the testbench. Also checks
// that peak_valid comes exactly one cycle after bin 77.
module peak_detector_tb;
  localparam int SCAN = 77;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [11:0] xk_index = 0;
  logic signed [7:0] xk_re = 0, xk_im = 0;
  logic [11:0] peak_index;
  logic peak_valid;
  int checks = 0, failures = 0;

  peak_detector dut (.clk, .rst, .in_valid, .xk_index, .xk_re, .xk_im, .peak_index, .peak_valid);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input int kind);
    int best_mag, best_idx, m;
    int re, im;
    best_mag = 0; best_idx = 0;
    for (int k = 0; k < 120; k++) begin
      @(negedge clk);
      case (kind)
        0: begin re = $urandom_range(0, 8) - 4; im = $urandom_range(0, 8) - 4; end
        1: begin re = $urandom_range(0, 40) - 20; im = $urandom_range(0, 40) - 20; end
        default: begin
          re = (k == 80) ? 100 : $urandom_range(0, 20) - 10;
          im = (k == 80) ? -100 : $urandom_range(0, 20) - 10;
        end
      endcase
      if (kind == 1 && k == 30) begin re = -127; im = 90; end
      m = re * re + im * im;
      xk_index = 12'(k); xk_re = 8'(re); xk_im = 8'(im);
      in_valid = ($urandom_range(0, 4) != 0) || k == SCAN;
      if (in_valid && k < SCAN && m > best_mag && m > 100) begin best_mag = m; best_idx = k; end
      if (k == SCAN) begin
        @(posedge clk); #1;
        in_valid = 0;
        checks += 2;
        if (!peak_valid) begin failures++; $display("no peak_valid after bin %0d", SCAN); end
        if (peak_index != 12'(best_idx)) begin
          failures++;
          $display("kind %0d: peak %0d expected %0d", kind, peak_index, best_idx);
        end
      end else begin
        @(posedge clk); #1;
        checks++;
        if (peak_valid) begin failures++; $display("spurious peak_valid at bin %0d", k); end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 60; f++) run_frame(f % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
