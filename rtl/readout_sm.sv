// readout_sm: the ReadOut state machine, sending the stored frames on Dout.
//
// Chips sharing a data line are read one after the other: each chip waits for
// StartReadOut, sends all its frames while holding TransmitOn, then raises
// EndReadOut, which is the next chip's StartReadOut. Here, after a
// synchronized StartReadOut pulse (start), the machine reads the last stored
// frame from the RAM, loads the serializer and, at the next slow-clock tick,
// raises transmit_on. Every tick then moves Dout to the next bit; a frame
// takes W ticks. While a frame is sent the next one is fetched, so frames
// follow each other without a gap. After the last bit the machine drops
// transmit_on and holds end_readout for one slow-clock period. With no frame
// stored it raises end_readout at the next tick. Frames leave the memory as they are
// sent (the shared address counter counts down), so the memory is empty
// afterwards.
//
// The daisy chain, the signal names and one serial output at the slow clock
// rate follow the chip description; the last-in first-out order, the
// one-period EndReadOut and the prefetch are this design's choices. The
// bypass of a chip (EndReadOut following StartReadOut) is done at the top.
module readout_sm #(
  parameter int unsigned W = 160
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic tick,
  input  logic empty,
  output logic rd_en,
  output logic dec,
  output logic load,
  output logic shift,
  output logic transmit_on,
  output logic end_readout,
  output logic busy
);

  typedef enum logic [2:0] {S_IDLE, S_FETCH, S_LOAD, S_ALIGN, S_SEND, S_ENDW, S_END} state_t;
  state_t state;
  logic [$clog2(W)-1:0] bitn;
  logic fetched;
  logic last_bit;

  assign last_bit = (bitn == $bits(bitn)'(W - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      bitn    <= '0;
      fetched <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:  if (start) state <= empty ? S_ENDW : S_FETCH;
        S_ENDW:  if (tick) state <= S_END;
        S_FETCH: state <= S_LOAD;
        S_LOAD:  state <= S_ALIGN;
        S_ALIGN: if (tick) begin
          state   <= S_SEND;
          bitn    <= '0;
          fetched <= 1'b0;
        end
        S_SEND: begin
          if (!fetched && !empty) fetched <= 1'b1;
          if (tick) begin
            if (!last_bit) bitn <= bitn + 1'b1;
            else if (fetched) begin
              bitn    <= '0;
              fetched <= 1'b0;
            end else state <= S_END;
          end
        end
        S_END: if (tick) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rd_en = 1'b0;
    load  = 1'b0;
    dec   = 1'b0;
    shift = 1'b0;
    unique case (state)
      S_FETCH: rd_en = 1'b1;
      S_LOAD:  begin load = 1'b1; dec = 1'b1; end
      S_SEND: begin
        if (!fetched && !empty) rd_en = 1'b1;
        if (tick) begin
          if (!last_bit) shift = 1'b1;
          else if (fetched) begin load = 1'b1; dec = 1'b1; end
        end
      end
      default: ;
    endcase
  end

  assign transmit_on = (state == S_SEND);
  assign end_readout = (state == S_END);
  assign busy        = (state != S_IDLE);

  // readout rules: TransmitOn and EndReadOut never overlap, a frame is only
  // loaded from a read issued in an earlier cycle
  a_tx_end: assert property (@(posedge clk) disable iff (!rst_n) !(transmit_on && end_readout));
  a_ld_sh:  assert property (@(posedge clk) disable iff (!rst_n) !(load && shift));
  a_rd_ld:  assert property (@(posedge clk) disable iff (!rst_n) load |-> !rd_en);

endmodule
