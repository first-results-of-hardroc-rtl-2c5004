// ram_addr_counter: fill counter and address of the event memory.
//
// One counter, shared by the write and the readout state machines, holds the
// number of stored frames (0..DEPTH). A write uses address count and then
// increments it; a read uses address count-1 and then decrements it, so the
// frames are read back last-in first-out. full is set when DEPTH frames are
// stored, empty when none are. The chip description shows one 7-bit address
// counter between both state machines; the up/down use and the readout order
// are this design's choices. inc and dec are not expected together; if they
// come together the count is kept.
module ram_addr_counter #(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          inc,
  input  logic          dec,
  input  logic          clr,
  output logic [AW-1:0] wr_addr,
  output logic [AW-1:0] rd_addr,
  output logic [AW:0]   count,
  output logic          full,
  output logic          empty
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 count <= '0;
    else if (clr)               count <= '0;
    else if (inc && !dec && !full)  count <= count + 1'b1;
    else if (dec && !inc && !empty) count <= count - 1'b1;
  end

  assign wr_addr = count[AW-1:0];
  assign rd_addr = count[AW-1:0] - 1'b1;   // count = DEPTH gives DEPTH-1
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);

  a_range: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
