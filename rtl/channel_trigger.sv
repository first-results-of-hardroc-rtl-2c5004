// channel_trigger: digital part of one input channel.
//
// Each channel has two discriminators (D0 and D1, two thresholds). A hit on
// either is held in a set/reset memory: it is set while ValEvt is high, the
// channel is enabled by its Valid_trig slow-control bit and the discriminator
// fires, and it is cleared by RazChn. The two held bits are the channel's two
// bits in the stored frame; the D1 bit also feeds the chip's OR64 trigger.
// When read_trig is high (the channel is selected by the read register and
// probing is enabled) the raw discriminator outputs and the held bits are put
// on the chip's bussed probe lines; otherwise this channel drives 0 there.
//
// The chip uses an asynchronous RS latch. Here the memory is a flip-flop on
// Clk_40MHz, so a discriminator pulse must last at least one 25 ns period to be
// seen; clear wins over set. Both are this design's choices.
//
// Timing: hit follows one clock after the set or clear condition.
module channel_trigger (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] disc,       // {D1, D0}
  input  logic       val_evt,
  input  logic       raz,
  input  logic       valid,
  input  logic       read_trig,
  output logic [1:0] hit,        // {trigger1, trigger0}
  output logic [1:0] direct_out,
  output logic [1:0] rs_out
);

  logic [1:0] set;
  assign set = disc & {2{val_evt & valid}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   hit <= '0;
    else if (raz) hit <= '0;
    else          hit <= hit | set;
  end

  assign direct_out = disc & {2{read_trig}};
  assign rs_out     = hit  & {2{read_trig}};

endmodule
