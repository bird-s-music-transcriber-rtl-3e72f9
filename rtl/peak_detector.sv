// peak_detector: finds the loudest frequency bin of each FFT frame.
//
// The FFT streams one bin per accepted sample: an index and the real and
// imaginary parts (two's complement). For every bin below SCAN_BINS the block
// forms the power re*re + im*im and compares it with a running maximum; a
// larger power that also exceeds the noise floor MIN_MAG replaces the maximum
// and its index is kept in a parallel register. When the bin SCAN_BINS
// arrives the scan of the audible range is over: the kept index is published
// on peak_index with a one-cycle peak_valid, and maximum and index are
// cleared for the next frame. A frame with no bin above MIN_MAG publishes 0,
// which the look-up table maps to a rest.
//
// Timing: one bin per clk cycle with in_valid high, peak_index registered,
// valid one cycle after bin SCAN_BINS was presented. The scan limit (77 bins,
// about 900 Hz at 48 kHz / 4096) and the threshold 100 are the design's;
// clearing the kept index to 0 at the end of a frame is this implementation's
// choice, so that silence is reported as a rest.
module peak_detector #(
  parameter int unsigned IDX_W     = 12,
  parameter int unsigned DW        = 8,
  parameter int unsigned SCAN_BINS = 77,
  parameter int unsigned MIN_MAG   = 100
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [IDX_W-1:0]     xk_index,
  input  logic signed [DW-1:0] xk_re,
  input  logic signed [DW-1:0] xk_im,
  output logic [IDX_W-1:0]     peak_index,
  output logic                 peak_valid
);
  localparam int unsigned MAG_W = 2 * DW + 1;

  logic [MAG_W-1:0] mag, max_val;
  logic [IDX_W-1:0] max_idx;
  logic signed [2*DW-1:0] re_sq, im_sq;

  always_comb begin
    re_sq = xk_re * xk_re;
    im_sq = xk_im * xk_im;
    mag   = MAG_W'(unsigned'(re_sq)) + MAG_W'(unsigned'(im_sq));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      max_val    <= '0;
      max_idx    <= '0;
      peak_index <= '0;
      peak_valid <= 1'b0;
    end else begin
      peak_valid <= 1'b0;
      if (in_valid) begin
        if (xk_index == IDX_W'(SCAN_BINS)) begin
          peak_index <= max_idx;
          peak_valid <= 1'b1;
          max_val    <= '0;
          max_idx    <= '0;
        end else if (xk_index < IDX_W'(SCAN_BINS) && mag > max_val &&
                     mag > MAG_W'(MIN_MAG)) begin
          max_val <= mag;
          max_idx <= xk_index;
        end
      end
    end
  end
endmodule
