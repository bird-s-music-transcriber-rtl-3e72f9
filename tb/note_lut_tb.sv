// note_lut_tb: sweeps every bin from 0 to 120. The expected note is found in
// the testbench from its own copy of the note table, in real arithmetic:
// the semitone whose band (midpoints to its neighbours) holds the bin's
// frequency. Bins within 1 Hz of a band edge are skipped, since rounding
// there is a matter of convention. A few bins are also checked by hand.
module note_lut_tb;
  logic clk = 0, rst = 1, peak_valid = 0;
  logic [11:0] peak_index = 0;
  logic [4:0] note;
  logic sharp;
  int checks = 0, failures = 0;

  note_lut dut (.clk, .rst, .peak_valid, .peak_index, .note, .sharp);
  always #5 clk = ~clk;

  // C4 .. A5 in Hz, and the staff step / black-key flag of each semitone.
  real f[22] = '{261.63, 277.18, 293.66, 311.13, 329.63, 349.23, 369.99, 392.00, 415.30,
                 440.00, 466.16, 493.88, 523.25, 554.37, 587.33, 622.25, 659.26, 698.46,
                 739.99, 783.99, 830.61, 880.00};
  int step[22] = '{0,0,1,1,2,3,3,4,4,5,5,6,7,7,8,8,9,10,10,11,11,12};
  int blk[22]  = '{0,1,0,1,0,0,1,0,1,0,1,0,0,1,0,1,0,0,1,0,1,0};

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int idx);
    @(negedge clk);
    peak_index = 12'(idx);
    peak_valid = 1;
    @(negedge clk);
    peak_valid = 0;
  endtask

  initial begin
    real hz, lo, hi;
    int exp_note, exp_sharp;
    bit skip;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int idx = 0; idx <= 120; idx++) begin
      apply(idx);
      hz = real'(idx) * 48000.0 / 4096.0;
      exp_note = 0; exp_sharp = 0; skip = 0;
      for (int s = 2; s <= 20; s++) begin
        lo = (f[s] + f[s-1]) / 2.0;
        hi = (f[s] + f[s+1]) / 2.0;
        if (hz >= lo && hz < hi) begin exp_note = step[s]; exp_sharp = blk[s]; end
        if ((hz - lo < 1.0 && lo - hz < 1.0) || (hz - hi < 1.0 && hi - hz < 1.0)) skip = 1;
      end
      if (!skip) begin
        checks++;
        if (note != 5'(exp_note) || sharp != 1'(exp_sharp)) begin
          failures++;
          $display("bin %0d (%0.1f Hz): note %0d sharp %0d, expected %0d %0d",
                   idx, hz, note, sharp, exp_note, exp_sharp);
        end
      end
    end
    // Hand-checked: bin 38 = 445 Hz = A4 (step 5), bin 26 = 304 Hz = D#4,
    // bin 70 = 820 Hz = G#5, bin 10 = 117 Hz is out of range (rest).
    apply(38); checks++; if (note != 5 || sharp != 0) failures++;
    apply(26); checks++; if (note != 1 || sharp != 1) failures++;
    apply(70); checks++; if (note != 11 || sharp != 1) failures++;
    apply(10); checks++; if (note != 0 || sharp != 0) failures++;
    // Output holds without peak_valid.
    @(negedge clk); peak_index = 12'd38; repeat (3) @(negedge clk);
    checks++; if (note != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
