// debounce: cleans a mechanical push button.
//
// The raw input is sampled every clock. Any change restarts a counter; only
// when the input has stayed at its new value for DELAY cycles (10 ms at
// 27 MHz by default) is it copied to clean. The reset input loads both the
// sample and the clean output with the current raw value. Parameterised from
// the design's fixed 270,000-cycle delay.
module debounce #(
  parameter int unsigned DELAY = 270000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);
  localparam int unsigned CW = $clog2(DELAY + 1);

  logic          sample;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      sample <= noisy;
      clean  <= noisy;
      count  <= '0;
    end else if (noisy != sample) begin
      sample <= noisy;
      count  <= '0;
    end else if (count == CW'(DELAY)) begin
      clean <= sample;
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule
