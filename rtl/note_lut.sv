// note_lut: maps the peak FFT bin to a note number and a sharp flag.
//
// Two steps. The bin index is first converted to a frequency in whole hertz,
// f = index * 48000 / 4096 (integer, rounded down). The frequency is then
// compared with the edges of the bands of the semitones LO_SEMI..HI_SEMI
// above C4; each band runs from the midpoint with the semitone below to the
// midpoint with the semitone above (frequencies of the equal-tempered table in
// mt_pkg). A hit gives that semitone's diatonic step above C4 as note and its
// black-key flag as sharp; anything outside the bands gives note 0, the same
// code as a rest.
//
// The default range D4..G#5 covers the treble staff with one step to spare
// each side, as in the design; widening it only needs new parameter values
// (the note number must stay above 0, so LO_SEMI >= 1). Outputs are
// registered and update one cycle after a peak_valid pulse.
module note_lut
  import mt_pkg::*;
#(
  parameter int unsigned IDX_W   = 12,
  parameter int unsigned LO_SEMI = 2,   // D4
  parameter int unsigned HI_SEMI = 20   // G#5
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             peak_valid,
  input  logic [IDX_W-1:0] peak_index,
  output note_t            note,
  output logic             sharp
);
  localparam int unsigned F_W = IDX_W + 16;

  logic [F_W-1:0] freq_hz;
  note_t note_d;
  logic  sharp_d;

  always_comb begin
    freq_hz = (F_W'(peak_index) * F_W'(FS_HZ)) >> FFT_LOG;
    note_d  = '0;
    sharp_d = 1'b0;
    for (int unsigned s = LO_SEMI; s <= HI_SEMI; s++) begin
      if (freq_hz >= F_W'(band_low_hz(s)) && freq_hz < F_W'(band_low_hz(s + 1))) begin
        note_d  = note_t'(semitone_step(s));
        sharp_d = semitone_sharp(s);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      note  <= '0;
      sharp <= 1'b0;
    end else if (peak_valid) begin
      note  <= note_d;
      sharp <= sharp_d;
    end
  end
endmodule
