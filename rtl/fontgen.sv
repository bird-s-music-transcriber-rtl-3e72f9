// fontgen: picks the glyphs that represent the incoming note.
//
// On each new_note pulse cstring is loaded with two font codes for the note
// sprite (left glyph in [7:4], right glyph in [3:0]):
//   note 0 (rest):  whole rest | blank, half rest + quarter rest (3 beats),
//                   half rest | blank, quarter rest | blank
//   note > 0:       whole / dotted half / half / quarter note head, followed
//                   by a sharp sign when sharp is set, else by blank
// A duration outside 1..4 gives the error glyph twice. Reset and newpage
// load blank | blank, so nothing is drawn until the first note and nothing
// more once the page is full. clef_code is the treble clef, the only clef
// this design displays. The selection rules are the design's; the numeric
// font codes are listed in mt_pkg. cstring is registered (27 MHz domain).
module fontgen
  import mt_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       newpage,
  input  logic       new_note,
  input  note_t      note,
  input  dur_t       duration,
  input  logic       sharp,
  output logic [7:0] cstring,
  output logic [3:0] clef_code
);
  font_t head, rest_l, rest_r, second;

  always_comb begin
    head   = F_ERROR;
    rest_l = F_ERROR;
    rest_r = F_ERROR;
    case (duration)
      DUR_WHOLE:   begin head = F_WHOLE;       rest_l = F_WHOLE_REST;   rest_r = F_BLANK;        end
      DUR_DOTTED:  begin head = F_DOTTED_HALF; rest_l = F_HALF_REST;    rest_r = F_QUARTER_REST; end
      DUR_HALF:    begin head = F_HALF;        rest_l = F_HALF_REST;    rest_r = F_BLANK;        end
      DUR_QUARTER: begin head = F_QUARTER;     rest_l = F_QUARTER_REST; rest_r = F_BLANK;        end
      default: ;
    endcase
    second = sharp ? F_SHARP : F_BLANK;
  end

  always_ff @(posedge clk) begin
    if (rst || newpage)
      cstring <= {F_BLANK, F_BLANK};
    else if (new_note) begin
      if (head == F_ERROR)  cstring <= {F_ERROR, F_ERROR};
      else if (note == '0)  cstring <= {rest_l, rest_r};
      else                  cstring <= {head, second};
    end
  end

  assign clef_code = CLEF_TREBLE;
endmodule
