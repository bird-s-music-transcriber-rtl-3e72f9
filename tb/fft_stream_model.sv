// fft_stream_model: behavioural stand-in for the streaming FFT core, for
// simulation only.
//
// It does not transform anything: it plays back the spectrum of a pure tone
// chosen by the testbench. On every ce pulse it presents the next output
// bin (index 0..FRAME-1, then wraps), with xk_re = xk_im = amp at bin `bin`,
// small pseudo-random values elsewhere, and dv high. FRAME may be set far
// below the real core's 4096 points to keep simulations short; only the
// bins below the peak detector's scan limit matter.
module fft_stream_model #(
  parameter int FRAME = 128
) (
  input  logic              clk,
  input  logic              ce,
  input  int                bin,
  input  int                amp,
  output logic              dv,
  output logic [11:0]       xk_index,
  output logic signed [7:0] xk_re,
  output logic signed [7:0] xk_im
);
  int k = 0;
  initial begin
    dv = 0; xk_index = 0; xk_re = 0; xk_im = 0;
  end
  always @(posedge clk) if (ce) begin
    dv       <= 1'b1;
    xk_index <= 12'(k);
    xk_re    <= (k == bin) ? 8'(amp) : 8'($urandom_range(0, 6) - 3);
    xk_im    <= (k == bin) ? 8'(amp) : 8'($urandom_range(0, 6) - 3);
    k        <= (k == FRAME - 1) ? 0 : k + 1;
  end
endmodule
