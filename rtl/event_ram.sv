// event_ram: the 128 x 160-bit event memory.
//
// One write port and one read port on Clk_40MHz; the read data is registered
// (available one clock after rd_en). The contents are not reset: a frame is
// only read after it has been written. Size follows the chip description
// (128 words of 160 bits, 20480 bits); the port arrangement is this design's
// choice.
module event_ram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned W     = 160,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          rd_en,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) rdata <= mem[raddr];
  end

endmodule
