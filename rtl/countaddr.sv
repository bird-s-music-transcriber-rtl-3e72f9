// countaddr: converts the raster position to a video memory address.
//
// The address is {vcount, hcount[9:0]}: row-major with 1024 words per row,
// so scanning a line reads consecutive addresses. visible is high only
// inside the 1024x768 area; outside it the address is forced to 0 and the
// video path must not write (the memory holds only the visible area).
// Combinational. The address format is the design's; the separate visible
// flag is this implementation's way of keeping blanking-time pixels out of
// the memory.
module countaddr
  import mt_pkg::*;
#(
  parameter int unsigned WIDTH  = 1024,
  parameter int unsigned HEIGHT = 768
) (
  input  logic [HC_W-1:0]    hcount,
  input  logic [VC_W-1:0]    vcount,
  output logic [VADDR_W-1:0] addr,
  output logic               visible
);
  always_comb begin
    visible = (hcount < HC_W'(WIDTH)) && (vcount < VC_W'(HEIGHT));
    addr    = visible ? {vcount, hcount[9:0]} : '0;
  end
endmodule
