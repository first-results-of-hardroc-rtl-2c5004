// read_register: 64-bit serial register choosing the probed channels.
//
// One flip-flop per channel, chained from channel 0 to channel NCH-1 and
// clocked by CK_R with an active-low reset rst_R*; D_R enters channel 0 and the
// last stage is the Q_R pin. A channel whose bit is set puts its trigger
// signals on the chip's bussed probe outputs (see channel_trigger). The chip
// description shows the per-channel flip-flop and the pins; the chaining
// order and reset value are this design's choices.
module read_register #(
  parameter int unsigned NCH = 64
) (
  input  logic           ck,
  input  logic           rst_n,
  input  logic           d,
  output logic           q,
  output logic [NCH-1:0] sel
);

  always_ff @(posedge ck or negedge rst_n) begin
    if (!rst_n) sel <= '0;
    else        sel <= {sel[NCH-2:0], d};
  end

  assign q = sel[NCH-1];

endmodule
