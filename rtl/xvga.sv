// xvga: raster timing for a 1024x768 display at 60 Hz with a 65 MHz clock.
//
// hcount runs 0..H_TOTAL-1 (1344 pixels per line) and vcount 0..V_TOTAL-1
// (806 lines per frame); 65 MHz / (1344 * 806) = 60.0 Hz. Pixels with
// hcount < 1024 and vcount < 768 are visible. hsync is low (active) for
// hcount 1048..1183 and vsync for vcount 777..782; blank is high outside the
// visible area. All outputs are registered and mutually aligned: in any
// cycle hsync, vsync and blank describe the pixel (hcount, vcount) shown on
// the same cycle. hreset marks the last pixel of a line. The frame
// dimensions are the design's; the module is written from them.
//
// There is deliberately no reset: the raster must keep scanning while the
// page reset is held, because clearing the video memory relies on the scan.
// The counters need no initial value either: from any start state hcount
// and vcount wrap into the normal sequence within one frame.
module xvga
  import mt_pkg::*;
#(
  parameter int unsigned H_ACTIVE     = 1024,
  parameter int unsigned H_SYNC_START = 1048,
  parameter int unsigned H_SYNC_END   = 1184,
  parameter int unsigned H_TOTAL      = 1344,
  parameter int unsigned V_ACTIVE     = 768,
  parameter int unsigned V_SYNC_START = 777,
  parameter int unsigned V_SYNC_END   = 783,
  parameter int unsigned V_TOTAL      = 806
) (
  input  logic            clk,
  output logic [HC_W-1:0] hcount,
  output logic [VC_W-1:0] vcount,
  output logic            hsync,
  output logic            vsync,
  output logic            blank,
  output logic            hreset
);
  logic [HC_W-1:0] h_n;
  logic [VC_W-1:0] v_n;

  assign hreset = (hcount == HC_W'(H_TOTAL - 1));

  always_comb begin
    h_n = hreset ? '0 : hcount + 1'b1;
    v_n = vcount;
    if (hreset) v_n = (vcount == VC_W'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
  end

  always_ff @(posedge clk) begin
    hcount <= h_n;
    vcount <= v_n;
    hsync  <= !(h_n >= HC_W'(H_SYNC_START) && h_n < HC_W'(H_SYNC_END));
    vsync  <= !(v_n >= VC_W'(V_SYNC_START) && v_n < VC_W'(V_SYNC_END));
    blank  <= (h_n >= HC_W'(H_ACTIVE)) || (v_n >= VC_W'(V_ACTIVE));
  end
endmodule
