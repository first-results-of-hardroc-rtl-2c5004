// serializer: the data serializer, 160-bit frame to the single Dout line.
//
// load copies a frame into the shift register; each shift moves it one place
// so that dout shows the next bit. The most significant bit (header bit 7)
// comes out first: the bit order is this design's choice. Shifts are issued
// on the slow-clock ticks by the readout state machine, giving one bit per
// 5 MHz (or 1 MHz) period. load has priority over shift.
module serializer #(
  parameter int unsigned W = 160
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] din,
  input  logic         shift,
  output logic         dout
);

  logic [W-1:0] sreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sreg <= '0;
    else if (load)  sreg <= din;
    else if (shift) sreg <= {sreg[W-2:0], 1'b0};
  end

  assign dout = sreg[W-1];

endmodule
