// tempo_select: turns the three tempo switches into a beat length.
//
// The beat length is the number of 27 MHz clock cycles in one beat. Eight
// tempos are predefined, from 9,000,000 cycles (0.33 s, 180 beats per minute)
// to 33,500,000 cycles (1.24 s, about 48 beats per minute); the table values
// are the design's. Reset selects 10,000,000 cycles. The output is
// registered, so a new switch setting takes effect one cycle later.
module tempo_select
  import mt_pkg::*;
#(
  parameter logic [BEAT_W-1:0] TEMPOS [8] = '{
    25'd9000000,  25'd13000000, 25'd15000000, 25'd17000000,
    25'd22000000, 25'd25000000, 25'd27000000, 25'd33500000},
  parameter logic [BEAT_W-1:0] RESET_TEMPO = 25'd10000000
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [2:0]        sw,
  output logic [BEAT_W-1:0] beat_len
);
  always_ff @(posedge clk) begin
    if (rst) beat_len <= RESET_TEMPO;
    else     beat_len <= TEMPOS[sw];
  end
endmodule
