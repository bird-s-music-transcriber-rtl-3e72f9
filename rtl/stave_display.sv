// stave_display: the fixed sprite that draws the staves.
//
// The page holds NSTAVES staves of five horizontal lines each. Stave s
// starts at row UPMARGIN + s*BIGSPACE; within a stave line l starts LINE +
// SPACE rows below line l-1 and is LINE rows thick. pixel is high on every
// row that belongs to a line, across the whole width, so it depends on
// vcount only. With the defaults (margin 55, 1-row lines 8 rows apart,
// staves 62 rows apart, 11 staves) the lines of the first stave are rows 55,
// 63, 71, 79, 87 and the last stave ends at row 707. All numbers are the
// design's. Purely combinational.
module stave_display
  import mt_pkg::*;
#(
  parameter int unsigned UPMARGIN = 55,
  parameter int unsigned LINE     = 1,
  parameter int unsigned SPACE    = 7,
  parameter int unsigned BIGSPACE = 62,
  parameter int unsigned NSTAVES  = 11,
  parameter int unsigned NLINES   = 5
) (
  input  logic [VC_W-1:0] vcount,
  output logic            pixel
);
  always_comb begin
    pixel = 1'b0;
    for (int unsigned s = 0; s < NSTAVES; s++) begin
      for (int unsigned l = 0; l < NLINES; l++) begin
        if (int'(vcount) >= int'(UPMARGIN + s * BIGSPACE + l * (LINE + SPACE)) &&
            int'(vcount) <  int'(UPMARGIN + s * BIGSPACE + l * (LINE + SPACE) + LINE))
          pixel = 1'b1;
      end
    end
  end
endmodule
