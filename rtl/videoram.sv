// videoram: the 1-bit-per-pixel frame store, 1024x768 words of 1 bit.
//
// A simple dual-port RAM: one synchronous read port (dout is the word at
// raddr of the previous cycle) and one synchronous write port. The video
// path reads a pixel in one cycle and, one cycle later, writes back to the
// same address, so the two ports never address the same word in one cycle
// except on purpose. Writes outside DEPTH are ignored. The contents are
// not initialised: the display clears them by holding reset for a frame.
// Size and width are the design's; the dual-port arrangement is this
// implementation's choice (see video_display).
module videoram
  import mt_pkg::*;
#(
  parameter int unsigned DEPTH = 1024 * 768
) (
  input  logic               clk,
  input  logic [VADDR_W-1:0] raddr,
  output logic               dout,
  input  logic               we,
  input  logic [VADDR_W-1:0] waddr,
  input  logic               din
);
  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    dout <= (raddr < VADDR_W'(DEPTH)) ? mem[raddr] : 1'b0;
    if (we && waddr < VADDR_W'(DEPTH)) mem[waddr] <= din;
  end
endmodule
