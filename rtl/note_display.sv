// note_display: movable sprite showing a note as a string of two glyphs.
//
// cstring carries two 4-bit font codes: cstring[7:4] is drawn on the left,
// cstring[3:0] on the right (a note and its sharp, or two rests). Each glyph
// is an 8x12 bitmap held in a 192 x 8-bit ROM (16 glyphs of 12 rows, row r
// of glyph c at address 12*c + r, MSB = leftmost pixel), drawn at twice its
// size, so the sprite covers 32x24 pixels with its top-left corner at
// (cx, cy). For hoff = hcount - cx and voff = vcount - cy in_box that box,
// the glyph is chosen by hoff[4], its column by hoff[3:1] and its row by
// voff[4:1]; pixel is 1 where the bitmap is set and 0 elsewhere.
//
// The ROM is read asynchronously, so pixel is a combinational function of
// the inputs and is registered by the video path. The glyph size, scaling,
// ROM organisation and two-character string are the design's; the glyph
// pictures (note_font.hex) and the left/right order are this
// implementation's.
module note_display
  import mt_pkg::*;
#(
  parameter string FONT_FILE = "rtl/note_font.hex"
) (
  input  logic [HC_W-1:0] hcount,
  input  logic [VC_W-1:0] vcount,
  input  logic [7:0]      cstring,
  input  logic [HC_W-1:0] cx,
  input  logic [VC_W-1:0] cy,
  output logic            pixel
);
  logic [7:0] rom [192];
  initial $readmemh(FONT_FILE, rom);

  logic [HC_W-1:0] hoff;
  logic [VC_W-1:0] voff;
  logic [3:0]      code;
  logic [7:0]      row;
  logic [7:0]      addr;
  logic            in_box;

  always_comb begin
    hoff   = hcount - cx;
    voff   = vcount - cy;
    in_box = (hcount >= cx) && (vcount >= cy) && (hoff < 32) && (voff < 24);
    code   = hoff[4] ? cstring[3:0] : cstring[7:4];
    addr   = 8'(code * 12) + 8'(voff[4:1]);
    row    = rom[addr < 192 ? addr : 8'd0];
    pixel  = in_box && row[3'd7 - hoff[3:1]];
  end
endmodule
