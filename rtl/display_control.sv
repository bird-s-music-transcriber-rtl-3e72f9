// display_control: places each note on the page.
//
// The controller keeps the position of the current note (cx, cy) and the
// top reference row of the current stave, cy_fixed. On each new_note pulse:
//   * page full (cy_fixed >= LAST_ROW and cx >= LINE_END): the sprites are
//     parked off screen (cx = PARK_X, cy = PARK_Y) and newpage is raised;
//     the controller then stays stalled until reset.
//   * line full (cx >= LINE_END): the note goes to the start of the next
//     stave: cx = CX_INIT, cy_fixed grows by STAVE_H and the clef sprite
//     moves down to the new stave.
//   * otherwise cx advances by HDIST times the duration of the previous
//     note, so the space after a note grows with its length.
// The row of a note is cy_fixed - note*TONE (TONE rows per diatonic step,
// half a line spacing); rests sit at the fixed row cy_fixed - REST_SHIFT.
// The clef is drawn at (XCLEF_INIT, cy_fixed - CLEF_SHIFT).
//
// All position constants are the design's. Updating only on new_note,
// resetting the remembered duration to 0 (so the first note lands on
// CX_INIT) and holding newpage high until reset are this implementation's
// reading of the design. Registered outputs, 27 MHz domain.
module display_control
  import mt_pkg::*;
#(
  parameter int unsigned TONE       = 4,
  parameter int unsigned HDIST      = 30,
  parameter int unsigned STAVE_H    = 62,
  parameter int unsigned CX_INIT    = 35,
  parameter int unsigned CY_INIT    = 80,
  parameter int unsigned XCLEF_INIT = 10,
  parameter int unsigned CLEF_SHIFT = 27,
  parameter int unsigned REST_SHIFT = 20,
  parameter int unsigned LINE_END   = 900,
  parameter int unsigned LAST_ROW   = 700,
  parameter int unsigned PARK_X     = 1030,
  parameter int unsigned PARK_Y     = 750
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            new_note,
  input  note_t           note,
  input  dur_t            duration,
  output logic [HC_W-1:0] cx,
  output logic [VC_W-1:0] cy,
  output logic [HC_W-1:0] xclef,
  output logic [VC_W-1:0] yclef,
  output logic            newpage
);
  logic [VC_W-1:0] cy_fixed, base;
  dur_t            last_dur;
  logic            line_full, page_full;

  always_comb begin
    line_full = cx >= HC_W'(LINE_END);
    page_full = line_full && cy_fixed >= VC_W'(LAST_ROW);
    base      = line_full ? cy_fixed + VC_W'(STAVE_H) : cy_fixed;
  end

  assign xclef = HC_W'(XCLEF_INIT);

  always_ff @(posedge clk) begin
    if (rst) begin
      cx       <= HC_W'(CX_INIT);
      cy       <= VC_W'(CY_INIT);
      cy_fixed <= VC_W'(CY_INIT);
      yclef    <= VC_W'(CY_INIT - CLEF_SHIFT);
      last_dur <= '0;
      newpage  <= 1'b0;
    end else if (new_note) begin
      last_dur <= duration;
      if (page_full) begin
        cx       <= HC_W'(PARK_X);
        cy       <= VC_W'(PARK_Y);
        cy_fixed <= VC_W'(PARK_Y);
        newpage  <= 1'b1;
      end else begin
        cx       <= line_full ? HC_W'(CX_INIT) : cx + HC_W'(HDIST * last_dur);
        cy_fixed <= base;
        yclef    <= base - VC_W'(CLEF_SHIFT);
        cy       <= (note != '0) ? base - VC_W'(note * TONE) : base - VC_W'(REST_SHIFT);
      end
    end
  end
endmodule
