// bunch_counter: 24-bit bunch crossing counter (BCID).
//
// Counts the rising edges of the 5 MHz bunch clock (tick, a one-cycle pulse
// from the synchro block) while acquisition is running (en). Its own
// active-low reset is the chip's Bunch Cnt Reset* (rst_counter*) pin. The
// value is stored with every event as its time stamp. The width and the
// reset pin follow the chip description; counting only during acquisition
// and wrapping at 2^24 are this design's choices.
module bunch_counter #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         tick,
  input  logic         en,
  output logic [W-1:0] bcid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         bcid <= '0;
    else if (tick & en) bcid <= bcid + 1'b1;
  end

endmodule
