// write_sm: the WriteEvents state machine, storing one frame per trigger.
//
// When a synchronized trigger pulse arrives while acquisition is on and the
// memory is not full, the machine
//   - captures the bunch counter value (the event's BCID),
//   - raises ValEvtOut for VAL_CYC (4) Clk_40MHz periods,
//   - in the first period after ValEvtOut falls, writes the frame
//     {header, BCID, hits} into the RAM (we, which also advances the address
//     counter),
//   - raises RazChnOut for one period RAZ_DLY (2) periods after ValEvtOut
//     fell, clearing the channel hit memories,
// and is ready again in the next period: an event takes 8 periods, one
// 5 MHz bunch crossing. The 4-period ValEvtOut and the 2-period delay and
// 1-period length of RazChnOut follow the chip description; when the frame is
// written and that triggers during an event are ignored are this design's
// choices. full (this chip's memory or the shared RamFull line) blocks new
// events.
//
// Timing, trigger sampled at edge 0: ValEvtOut high in periods 1..4, write
// at the end of period 5, RazChnOut high in period 7, idle from period 8.
module write_sm
  import hardroc_pkg::*;
#(
  parameter int unsigned VAL_CYC = 4,
  parameter int unsigned RAZ_DLY = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              trig,
  input  logic              acq,
  input  logic              full,
  input  logic [BCID_W-1:0] bcid_in,
  output logic [BCID_W-1:0] bcid_q,
  output logic              we,
  output logic              val_evt_out,
  output logic              raz_out,
  output logic              busy
);

  typedef enum logic [1:0] {S_IDLE, S_VAL, S_GAP, S_RAZ} state_t;
  state_t state;
  logic [$clog2(VAL_CYC + RAZ_DLY + 1)-1:0] n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      n      <= '0;
      bcid_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (trig && acq && !full) begin
          state  <= S_VAL;
          n      <= '0;
          bcid_q <= bcid_in;
        end
        S_VAL: if (n == $bits(n)'(VAL_CYC - 1)) begin
          state <= S_GAP;
          n     <= '0;
        end else n <= n + 1'b1;
        S_GAP: if (n == $bits(n)'(RAZ_DLY - 1)) state <= S_RAZ;
               else n <= n + 1'b1;
        S_RAZ: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign val_evt_out = (state == S_VAL);
  assign we          = (state == S_GAP) && (n == '0);
  assign raz_out     = (state == S_RAZ);
  assign busy        = (state != S_IDLE);

  // event sequence rules
  a_excl:  assert property (@(posedge clk) disable iff (!rst_n) !(val_evt_out && (we || raz_out)));
  a_write: assert property (@(posedge clk) disable iff (!rst_n) $fell(val_evt_out) |-> we);
  a_raz:   assert property (@(posedge clk) disable iff (!rst_n) we |-> ##RAZ_DLY raz_out);

endmodule
