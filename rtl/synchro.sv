// synchro: brings the chip's asynchronous control inputs into Clk_40MHz.
//
// Trigger, StartAcq, StartReadOut and the slow clock (Clk_5MHz / 1MHz) each
// pass through STAGES flip-flops. For the trigger, StartReadOut and the slow
// clock a one-cycle pulse marks each rising edge; StartAcq is passed on as a
// level. The chip description names this block and its inputs; the number of
// stages and the edge pulses are this design's choice.
//
// Timing: an input that rises between two clock edges shows at the output
// after STAGES (2) further edges; pulses last one clock period.
module synchro #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trigger,
  input  logic start_acq,
  input  logic start_readout,
  input  logic clk_slow,
  output logic acq,
  output logic trig_rise,
  output logic ro_rise,
  output logic slow_rise
);

  localparam int unsigned NS = 4;
  logic [NS-1:0] in_w;
  logic [NS-1:0] sync [STAGES];
  logic [NS-1:0] last;

  assign in_w = {clk_slow, start_readout, start_acq, trigger};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(STAGES); s++) sync[s] <= '0;
      last <= '0;
    end else begin
      sync[0] <= in_w;
      for (int s = 1; s < int'(STAGES); s++) sync[s] <= sync[s-1];
      last <= sync[STAGES-1];
    end
  end

  logic [NS-1:0] now, rise;
  assign now  = sync[STAGES-1];
  assign rise = now & ~last;

  assign trig_rise = rise[0];
  assign acq       = now[1];
  assign ro_rise   = rise[2];
  assign slow_rise = rise[3];

endmodule
