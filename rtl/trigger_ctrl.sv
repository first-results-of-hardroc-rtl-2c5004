// trigger_ctrl: internal trigger (OR of the 64 D1 hits) and trigger selection.
//
// The internal trigger is the OR of the held D1 hits of all channels. The
// trigger used by the chip is the internal one when EN_trig_int is set, the
// external TriggerExt pin when EN_trig_ext is set, or either when both are.
// The same selected trigger is sent out on the out_trig_int pin when
// EN_out_trig_int is set. The chip description draws the choice as a switch
// and lists the three enable bits; combining them with OR is this design's
// reading. Purely combinational.
module trigger_ctrl #(
  parameter int unsigned NCH = 64
) (
  input  logic [NCH-1:0] hit1,
  input  logic           trigger_ext,
  input  logic           en_trig_int,
  input  logic           en_trig_ext,
  input  logic           en_out_trig_int,
  output logic           or64,
  output logic           trigger,
  output logic           trigger_out
);

  assign or64        = |hit1;
  assign trigger     = (en_trig_int & or64) | (en_trig_ext & trigger_ext);
  assign trigger_out = en_out_trig_int & trigger;

endmodule
