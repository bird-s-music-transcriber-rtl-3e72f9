// clef_display: movable sprite showing the clef at the start of a stave.
//
// Works like note_display with one larger glyph: a 16x24 bitmap chosen by
// the 4-bit code from a 384 x 16-bit ROM (16 glyphs of 24 rows, row r of
// glyph c at address 24*c + r, MSB = leftmost pixel), drawn at twice its size
// as a 32x48 box with its top-left corner at (cx, cy). Only the treble clef
// (code 1) is drawn by this design; the other slots are blank. pixel is a
// combinational function of the inputs. Glyph size, scaling and ROM
// organisation are the design's; the clef picture (clef_font.hex) is this
// implementation's.
module clef_display
  import mt_pkg::*;
#(
  parameter string FONT_FILE = "rtl/clef_font.hex"
) (
  input  logic [HC_W-1:0] hcount,
  input  logic [VC_W-1:0] vcount,
  input  logic [3:0]      code,
  input  logic [HC_W-1:0] cx,
  input  logic [VC_W-1:0] cy,
  output logic            pixel
);
  logic [15:0] rom [384];
  initial $readmemh(FONT_FILE, rom);

  logic [HC_W-1:0] hoff;
  logic [VC_W-1:0] voff;
  logic [15:0]     row;
  logic [8:0]      addr;
  logic            in_box;

  always_comb begin
    hoff   = hcount - cx;
    voff   = vcount - cy;
    in_box = (hcount >= cx) && (vcount >= cy) && (hoff < 32) && (voff < 48);
    addr   = 9'(code * 24) + 9'(voff[5:1]);
    row    = rom[addr < 384 ? addr : 9'd0];
    pixel  = in_box && row[4'd15 - hoff[4:1]];
  end
endmodule
