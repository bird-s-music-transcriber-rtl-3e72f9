// video_display: draws the transcribed music on a 1024x768 screen.
//
// Tracking (27 MHz domain): display_control turns each new_note into a
// sprite position (cx, cy) and a clef position, and fontgen into the two
// glyph codes (cstring). These quasi-static values cross to the 65 MHz
// pixel domain through cdc_bus_sync.
//
// Displaying (65 MHz domain): xvga scans the raster. Three sprites, the
// staves, the note and the clef, each give a 1-bit pixel for the current
// raster position; they are ORed together. The page itself lives in a 1-bit
// video memory that is never erased by the sprites: at each visible pixel
// the stored bit is read, and one cycle later
//   write enable = reset ? 1 : (stored ? 0 : sprite pixel)
//   write data   = reset ? 0 : 1
// so a pixel once set stays set, a moving sprite leaves its image behind,
// and holding reset for one frame (16.7 ms) clears the page. The stored
// bit is shown as black (000) on a white (111) page.
//
// Timing: rgb, hsync, vsync and blank leave two pixel clocks after xvga
// produced the raster position and are mutually aligned. A sprite is stored
// on the first frame it is fully scanned at its new position, so a note
// appears within one frame (plus about three pixel clocks of clock-domain
// crossing) of its new_note pulse. The non-erasable memory, the three
// sprites and the OR are the design's; reading and writing the memory one
// cycle apart (so the stored bit and the sprite pixel refer to the same
// address) is this implementation's.
module video_display
  import mt_pkg::*;
(
  input  logic       clk27,
  input  logic       rst27,
  input  logic       clk65,
  input  logic       rst65,
  input  logic       new_note,
  input  note_t      note,
  input  dur_t       duration,
  input  logic       sharp,
  output logic [2:0] rgb,
  output logic       hsync,
  output logic       vsync,
  output logic       blank,
  output logic       newpage
);
  // ---------------- tracking, 27 MHz ----------------
  logic [HC_W-1:0] cx27, xclef27;
  logic [VC_W-1:0] cy27, yclef27;
  logic [7:0]      cstring27;
  logic [3:0]      clef27;

  display_control u_ctrl (.clk(clk27), .rst(rst27), .new_note, .note, .duration,
                          .cx(cx27), .cy(cy27), .xclef(xclef27), .yclef(yclef27), .newpage);

  fontgen u_font (.clk(clk27), .rst(rst27), .newpage, .new_note, .note, .duration, .sharp,
                  .cstring(cstring27), .clef_code(clef27));

  localparam int unsigned XW = 2 * HC_W + 2 * VC_W + 8 + 4;
  logic [HC_W-1:0] cx, xclef;
  logic [VC_W-1:0] cy, yclef;
  logic [7:0]      cstring;
  logic [3:0]      clef_code;

  cdc_bus_sync #(.W(XW)) u_sync (
    .src_clk(clk27), .src_rst(rst27), .d({cx27, cy27, xclef27, yclef27, cstring27, clef27}),
    .dst_clk(clk65), .dst_rst(rst65), .q({cx, cy, xclef, yclef, cstring, clef_code}));

  // ---------------- displaying, 65 MHz ----------------
  logic [HC_W-1:0]    hcount;
  logic [VC_W-1:0]    vcount;
  logic               hs0, vs0, bl0;
  logic               stave_px, note_px, clef_px, bw_px;
  logic [VADDR_W-1:0] addr, addr_d;
  logic               visible, visible_d, px_d, ramout;
  logic               hs1, vs1, bl1;

  xvga u_xvga (.clk(clk65), .hcount, .vcount, .hsync(hs0), .vsync(vs0), .blank(bl0), .hreset());

  stave_display u_stave (.vcount, .pixel(stave_px));
  note_display  u_note  (.hcount, .vcount, .cstring, .cx, .cy, .pixel(note_px));
  clef_display  u_clef  (.hcount, .vcount, .code(clef_code), .cx(xclef), .cy(yclef), .pixel(clef_px));

  assign bw_px = stave_px | note_px | clef_px;

  countaddr u_addr (.hcount, .vcount, .addr, .visible);

  logic ram_we, ram_din;
  assign ram_we  = visible_d & (rst65 ? 1'b1 : (ramout ? 1'b0 : px_d));
  assign ram_din = ~rst65;

  videoram u_ram (.clk(clk65), .raddr(addr), .dout(ramout),
                  .we(ram_we), .waddr(addr_d), .din(ram_din));

  always_ff @(posedge clk65) begin
    addr_d    <= addr;
    visible_d <= visible;
    px_d      <= bw_px;
    hs1       <= hs0;
    vs1       <= vs0;
    bl1       <= bl0;
    rgb       <= (bl1 || ramout) ? 3'b000 : 3'b111;
    hsync     <= hs1;
    vsync     <= vs1;
    blank     <= bl1;
  end
endmodule
