// rhythm_tb: with a 20-cycle beat, plays notes of chosen lengths (including
// glitches shorter than half a beat, long notes over 4 beats and sharps) and
// checks every new_note event: that it comes one cycle after the change,
// and its note, sharp and duration. Expected durations are computed from
// the note length in beats (rounded to nearest, 1..4, 4-beat chunks for long
// notes). Also checks the beat period (L+1 cycles).
// A last phase repeats the design's own 1-cycle-beat test: a note that does
// not change gives a whole-note event every 5 cycles (4 beats counted from
// 0), and a note seen on 3 clock edges ends as a 3-beat event.
module rhythm_tb;
  localparam int L = 20;
  logic clk = 0, rst = 1;
  logic [24:0] beat_len = 25'(L);
  logic [4:0] note = 0, note_out;
  logic sharp = 0, sharp_out, new_note, beat;
  logic [2:0] duration;
  int checks = 0, failures = 0;
  int seen[5];

  rhythm dut (.clk, .rst, .beat_len, .note, .sharp, .note_out, .sharp_out, .duration, .new_note, .beat);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected event queue.
  typedef struct { int n; int s; int d; int at; } ev_t;
  ev_t q[$];
  int cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  bit fig = 0;   // 1-cycle-beat phase: the reference model is off
  always @(negedge clk) if (!rst && !fig) begin
    if (new_note) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected event at %0d", cyc); end
      else begin
        ev_t e;
        e = q.pop_front();
        if (note_out != 5'(e.n) || sharp_out != 1'(e.s) || duration != 3'(e.d) || cyc != e.at) begin
          failures++;
          $display("event at %0d: %0d/%0d dur %0d, expected %0d/%0d dur %0d at %0d",
                   cyc, note_out, sharp_out, duration, e.n, e.s, e.d, e.at);
        end
        if (duration <= 4) seen[duration]++;
      end
    end
  end

  // Beat period.
  int last_beat = -1;
  always @(negedge clk) if (!rst && !fig && beat) begin
    if (last_beat >= 0) begin
      checks++;
      if (cyc - last_beat != L + 1) begin failures++; $display("beat period %0d", cyc - last_beat); end
    end
    last_beat = cyc;
  end

  // Reference model: a note's length counter, evaluated on the same clock
  // edge as the design, pushing the events it expects to see next cycle.
  int m_cnt = 0, m_n = 0, m_s = 0;
  always @(posedge clk) if (!rst && !fig) begin
    if (int'(note) != m_n || int'(sharp) != m_s) begin
      if (m_cnt * 2 >= L) begin
        int d;
        d = (m_cnt * 2 < 3 * L) ? 1 : (m_cnt * 2 < 5 * L) ? 2 : (m_cnt * 2 < 7 * L) ? 3 : 4;
        q.push_back('{m_n, m_s, d, cyc + 1});
      end
      m_cnt = 0; m_n = int'(note); m_s = int'(sharp);
    end else if (m_cnt >= 4 * L) begin
      q.push_back('{m_n, m_s, 4, cyc + 1});
      m_cnt = 0;
    end else m_cnt++;
  end

  task automatic play(input int n, input int s, input int len);
    @(negedge clk);
    note = 5'(n); sharp = 1'(s);
    repeat (len - 1) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    play(0, 0, 30);
    play(5, 0, 1 * L);
    play(6, 0, 2 * L);
    play(7, 1, 3 * L);
    play(2, 0, 4 * L - 5);
    play(3, 0, 5);            // glitch, shorter than half a beat
    play(4, 0, 3 * L / 2 + 2);
    play(4, 1, 10 * L);       // long note: whole-note chunks
    play(0, 0, 2 * L + 3);
    play(9, 0, L / 2 + 1);
    for (int k = 0; k < 30; k++) play($urandom_range(0, 11), $urandom_range(0, 1), $urandom_range(2, 5 * L));
    play(1, 0, 3 * L);
    repeat (4) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d events missing", q.size()); end
    for (int d = 1; d <= 4; d++) begin
      checks++;
      if (seen[d] == 0) begin failures++; $display("no event of duration %0d", d); end
    end

    // ---- 1-cycle beat
    fig = 1;
    @(negedge clk); rst = 1; note = 0; sharp = 0; beat_len = 25'd1;
    repeat (2) @(negedge clk); rst = 0;
    begin
      int last = -1, n = 0;
      repeat (40) begin
        @(negedge clk);
        if (new_note) begin
          if (last >= 0) begin
            checks++;
            if (cyc - last != 5 || duration != 3'd4 || note_out != 0) begin
              failures++; $display("held note: event after %0d cycles, duration %0d", cyc - last, duration);
            end
          end
          last = cyc; n++;
        end
      end
      checks++;
      if (n < 7) begin failures++; $display("held note: only %0d events", n); end
    end
    note = 5'd1;
    repeat (3) @(negedge clk);
    note = 5'd0;
    begin
      bit got = 0;
      repeat (4) begin
        @(negedge clk);
        if (new_note && note_out == 5'd1) begin
          got = 1; checks++;
          if (duration != 3'd3) begin failures++; $display("3-edge note: duration %0d", duration); end
        end
      end
      checks++;
      if (!got) begin failures++; $display("3-edge note: no event"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
