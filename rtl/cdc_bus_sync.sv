// cdc_bus_sync: carries a slowly changing bus from one clock to another.
//
// Source side: the bus is copied into a holding register every src_clk
// cycle, and a toggle flips whenever the copy changes. Destination side:
// the toggle passes a two-flop synchroniser; when the synchronised toggle
// changes, the holding register (stable for at least two destination cycles
// by then) is captured into q. Correct as long as the bus changes no more
// often than every few destination cycles, which holds for note positions
// and font codes (they change at most once per half beat). Latency: about
// three destination cycles. Resets clear both sides to zero.
module cdc_bus_sync #(
  parameter int unsigned W = 8
) (
  input  logic         src_clk,
  input  logic         src_rst,
  input  logic [W-1:0] d,
  input  logic         dst_clk,
  input  logic         dst_rst,
  output logic [W-1:0] q
);
  logic [W-1:0] hold;
  logic         tog;
  logic [2:0]   tog_sync;

  always_ff @(posedge src_clk) begin
    if (src_rst) begin
      hold <= '0;
      tog  <= 1'b0;
    end else begin
      hold <= d;
      if (d != hold) tog <= ~tog;
    end
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin
      tog_sync <= '0;
      q        <= '0;
    end else begin
      tog_sync <= {tog_sync[1:0], tog};
      if (tog_sync[2] != tog_sync[1]) q <= hold;
    end
  end
endmodule
