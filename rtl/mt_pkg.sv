// mt_pkg: types and constants shared by the music transcriber.
//
// Holds the musical note table (equal-tempered frequencies from C4 to B6 in
// hundredths of a hertz), the note/duration encodings that travel from the
// note recognizer to the video display, and the 4-bit font codes of the note
// and clef sprite ROMs.
//
// Note numbering follows the design: a note is the number of diatonic steps
// above C4 (D4 = 1, E4 = 2, ... G5 = 11), with a separate sharp flag for the
// black keys; note 0 means a rest or a pitch outside the table. Durations are
// counted in beats, 1 (quarter) to 4 (whole). The font code assignment
// (which glyph sits at which of the 16 ROM slots) is this design's own.
package mt_pkg;

  // Audio front end: 48 kHz codec, 4096-point FFT.
  localparam int unsigned FS_HZ   = 48000;
  localparam int unsigned FFT_LOG = 12;

  localparam int unsigned NOTE_W = 5;
  localparam int unsigned DUR_W  = 3;
  localparam int unsigned BEAT_W = 25;  // beat length in 27 MHz cycles

  typedef logic [NOTE_W-1:0] note_t;
  typedef logic [DUR_W-1:0]  dur_t;

  localparam dur_t DUR_QUARTER = 3'd1;
  localparam dur_t DUR_HALF    = 3'd2;
  localparam dur_t DUR_DOTTED  = 3'd3;
  localparam dur_t DUR_WHOLE   = 3'd4;

  // Equal-tempered frequency of semitone s above C4 (s = 0..35), in 0.01 Hz.
  function automatic int unsigned semitone_chz(int unsigned s);
    int unsigned t[36] = '{
      26163, 27718, 29366, 31113, 32963, 34923, 36999, 39200, 41530, 44000, 46616, 49388,
      52325, 55437, 58733, 62225, 65926, 69846, 73999, 78399, 83061, 88000, 93233, 98777,
      104650, 110873, 117466, 124451, 131851, 139691, 147998, 156798, 166122, 176000, 186466, 197553};
    return t[s];
  endfunction

  // Lower edge, in whole hertz, of the frequency band recognised as semitone
  // s: the midpoint between s and the semitone below it, rounded.
  function automatic int unsigned band_low_hz(int unsigned s);
    return (semitone_chz(s) + semitone_chz(s - 1) + 100) / 200;
  endfunction

  // Diatonic step above C4 of semitone s, and whether s is a black key.
  function automatic int unsigned semitone_step(int unsigned s);
    int unsigned step_in_oct[12] = '{0, 0, 1, 1, 2, 3, 3, 4, 4, 5, 5, 6};
    return 7 * (s / 12) + step_in_oct[s % 12];
  endfunction

  function automatic bit semitone_sharp(int unsigned s);
    bit black[12] = '{0, 1, 0, 1, 0, 0, 1, 0, 1, 0, 1, 0};
    return black[s % 12];
  endfunction

  // Note sprite font codes (one 4-bit code per 8x12 glyph).
  typedef enum logic [3:0] {
    F_SHARP        = 4'h0,
    F_WHOLE        = 4'h1,
    F_DOTTED_HALF  = 4'h2,
    F_HALF         = 4'h3,
    F_QUARTER      = 4'h4,
    F_WHOLE_REST   = 4'h5,
    F_HALF_REST    = 4'h7,
    F_QUARTER_REST = 4'h8,
    F_BLANK        = 4'h9,
    F_ERROR        = 4'hA
  } font_t;

  // Clef sprite font code of the treble clef.
  localparam logic [3:0] CLEF_TREBLE = 4'h1;

  // Video geometry (1024x768 visible area).
  localparam int unsigned HC_W = 11;
  localparam int unsigned VC_W = 10;
  localparam int unsigned VADDR_W = 20;

endpackage
