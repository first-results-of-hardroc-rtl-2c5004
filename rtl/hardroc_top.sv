// hardroc_top: digital part of the HaRDROC 64-channel detector read-out chip.
//
// The chip reads 64 detector pads. Each channel's analog front end ends in two
// discriminators (two thresholds); their outputs, disc0 and disc1, are inputs
// here. During a bunch train the chip acquires on its own: a D1 hit on any
// channel (the OR64 internal trigger) or the external trigger starts the
// WriteEvents machine, which opens ValEvtOut for four 40 MHz periods, stores
// one 160-bit frame {chip tag, 24-bit BCID, 2 hit bits x 64 channels} in the
// 128-frame memory, and clears the channels with RazChnOut. When the memory is
// full the chip pulls the shared RamFull* line low and every chip on it stops.
// Between trains the DAQ raises StartReadOut; the chip sends its frames on
// one serial line (Dout*, one bit per slow-clock period, with TransmitOn*)
// and then raises EndReadOut, the next chip's StartReadOut.
//
// Clocks: everything runs on clk_40m. clk_slow (5 MHz during acquisition,
// 5 or 1 MHz during readout; one eighth of 40 MHz at 5 MHz) is synchronized
// and used as a tick. The slow-control register and the read register have
// their own serial clocks; their contents are static settings.
//
// Follows the chip description: block partition, widths and depth, pin
// names, the Valid_trig, trigger, RazChn, bypass and output-enable settings,
// ValEvtOut/RazChnOut timing, open-collector outputs with their buffered
// test points (*_007) and the daisy-chained readout. This design's own choices are listed in the module headers below
// (frame layout, readout order, synchronous hit memories, trigger selection).
// Acquisition and readout exclude each other: a StartReadOut that arrives
// during an event is held until the frame is written, and no event starts
// while a readout is pending or running.
// ValEvt and RazChn pins reach the channels as the DAQ drives them; wiring
// ValEvtOut/RazChnOut back to them is done on the board.
// The analog settings held in slow control are brought out on cfg_ana.
module hardroc_top
  import hardroc_pkg::*;
(
  input  logic            clk_40m,
  input  logic            clk_slow,
  input  logic            reset_n,
  input  logic            rst_counter_n,
  // acquisition control
  input  logic            start_acq,
  input  logic            val_evt,
  input  logic            raz_chn,
  input  logic            trigger_ext,
  input  logic [NCH-1:0]  disc0,
  input  logic [NCH-1:0]  disc1,
  output logic            val_evt_out,
  output logic            out_raz_chn_int,
  output logic            out_trig_int,
  // readout
  input  logic            start_readout,
  output logic            end_readout,
  output logic            dout_n,
  output logic            transmit_on_n,
  output logic            ramfull_n,
  input  logic            ramfull_ext_n,
  // buffered test points of the three open-collector signals (not enabled)
  output logic            dout_007,
  output logic            transmit_on_007,
  output logic            ramfull_007,
  // probe outputs of the channels chosen by the read register
  output logic            out_trig0,
  output logic            out_trig1,
  output logic            out_rs_trig0,
  output logic            out_rs_trig1,
  // slow control serial port
  input  logic            sc_clk,
  input  logic            sc_rst_n,
  input  logic            sc_d,
  output logic            sc_q,
  // read register serial port
  input  logic            r_clk,
  input  logic            r_rst_n,
  input  logic            r_d,
  output logic            r_q,
  // settings for the analog part
  output sc_ana_t         cfg_ana
);

  // ---------------- configuration
  sc_cfg_t          cfg;
  logic [SC_BITS-1:0] sc_bits;
  logic [NCH-1:0]   rsel;

  slow_control_register #(.N(SC_BITS)) u_sc (
    .ck(sc_clk), .rst_n(sc_rst_n), .d(sc_d), .q(sc_q), .bits(sc_bits), .cfg(cfg)
  );
  assign cfg_ana = cfg.ana;

  read_register #(.NCH(NCH)) u_rr (
    .ck(r_clk), .rst_n(r_rst_n), .d(r_d), .q(r_q), .sel(rsel)
  );

  // ---------------- channels
  logic            raz_int;
  logic            raz;
  logic [NCH-1:0]  hit0, hit1;
  logic [NCH-1:0]  dir0, dir1, rs0, rs1;

  assign raz = (cfg.dig.en_raz_int & raz_int) | (cfg.dig.en_raz_ext & raz_chn);

  for (genvar ch = 0; ch < NCH; ch++) begin : g_ch
    channel_trigger u_ch (
      .clk(clk_40m), .rst_n(reset_n),
      .disc({disc1[ch], disc0[ch]}),
      .val_evt(val_evt), .raz(raz), .valid(cfg.dig.valid_trig[ch]),
      .read_trig(rsel[ch] & cfg.dig.en_out_discri),
      .hit({hit1[ch], hit0[ch]}),
      .direct_out({dir1[ch], dir0[ch]}),
      .rs_out({rs1[ch], rs0[ch]})
    );
  end

  // bussed probe lines
  assign out_trig0    = |dir0;
  assign out_trig1    = |dir1;
  assign out_rs_trig0 = |rs0;
  assign out_rs_trig1 = |rs1;

  // ---------------- trigger
  logic or64, trigger;
  trigger_ctrl #(.NCH(NCH)) u_trig (
    .hit1(hit1), .trigger_ext(trigger_ext),
    .en_trig_int(cfg.dig.en_trig_int), .en_trig_ext(cfg.dig.en_trig_ext),
    .en_out_trig_int(cfg.dig.en_out_trig_int),
    .or64(or64), .trigger(trigger), .trigger_out(out_trig_int)
  );

  // ---------------- synchro and bunch counter
  logic acq, trig_rise, ro_rise, slow_rise;
  synchro u_sync (
    .clk(clk_40m), .rst_n(reset_n),
    .trigger(trigger), .start_acq(start_acq), .start_readout(start_readout), .clk_slow(clk_slow),
    .acq(acq), .trig_rise(trig_rise), .ro_rise(ro_rise), .slow_rise(slow_rise)
  );

  logic [BCID_W-1:0] bcid;
  bunch_counter #(.W(BCID_W)) u_bc (
    .clk(clk_40m), .rst_n(rst_counter_n), .tick(slow_rise), .en(acq), .bcid(bcid)
  );

  // ---------------- memory and its counter
  logic          we, rd_en, dec;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [AW:0]   count;
  logic          full, empty;

  ram_addr_counter #(.DEPTH(DEPTH)) u_cnt (
    .clk(clk_40m), .rst_n(reset_n), .inc(we), .dec(dec), .clr(1'b0),
    .wr_addr(wr_addr), .rd_addr(rd_addr), .count(count), .full(full), .empty(empty)
  );

  frame_t            wframe;
  logic [FRAME_W-1:0] rframe;
  logic [BCID_W-1:0] ev_bcid;

  always_comb begin
    wframe.header = cfg.dig.header;
    wframe.bcid   = ev_bcid;
    for (int ch = 0; ch < int'(NCH); ch++) wframe.hits[2*ch +: 2] = {hit1[ch], hit0[ch]};
  end

  event_ram #(.DEPTH(DEPTH), .W(FRAME_W)) u_ram (
    .clk(clk_40m), .we(we), .waddr(wr_addr), .wdata(wframe),
    .rd_en(rd_en), .raddr(rd_addr), .rdata(rframe)
  );

  // ---------------- write side
  // No event is started while a readout is requested or running; a readout
  // requested during an event waits until the frame is written.
  logic stop_write, wr_busy, ro_req, ro_busy;
  assign stop_write = full | ~ramfull_ext_n | ro_req | ro_busy;

  write_sm u_wsm (
    .clk(clk_40m), .rst_n(reset_n), .trig(trig_rise), .acq(acq), .full(stop_write),
    .bcid_in(bcid), .bcid_q(ev_bcid), .we(we),
    .val_evt_out(val_evt_out), .raz_out(raz_int), .busy(wr_busy)
  );
  assign out_raz_chn_int = cfg.dig.en_out_raz_int & raz_int;

  // ---------------- read side
  logic load, shift, transmit_on, end_ro_sm, ser_dout;

  always_ff @(posedge clk_40m or negedge reset_n) begin
    if (!reset_n)                          ro_req <= 1'b0;
    else if (ro_rise & ~cfg.dig.bypass_chip) ro_req <= 1'b1;
    else if (!wr_busy)                     ro_req <= 1'b0;
  end

  readout_sm #(.W(FRAME_W)) u_rsm (
    .clk(clk_40m), .rst_n(reset_n), .start(ro_req & ~wr_busy), .tick(slow_rise),
    .empty(empty), .rd_en(rd_en), .dec(dec), .load(load), .shift(shift),
    .transmit_on(transmit_on), .end_readout(end_ro_sm), .busy(ro_busy)
  );

  serializer #(.W(FRAME_W)) u_ser (
    .clk(clk_40m), .rst_n(reset_n), .load(load), .din(rframe), .shift(shift), .dout(ser_dout)
  );

  // a bypassed chip hands StartReadOut straight on
  assign end_readout = cfg.dig.bypass_chip ? start_readout : end_ro_sm;

  logic dout_int;
  assign dout_int = ser_dout & transmit_on;

  oc_driver u_oc_dout (.en(cfg.dig.en_dout),        .in(dout_int),               .out_n(dout_n));
  oc_driver u_oc_tx   (.en(cfg.dig.en_transmit_on), .in(transmit_on),            .out_n(transmit_on_n));
  // the memory is never written and read in the same cycle
  a_no_wr_rd: assert property (@(posedge clk_40m) disable iff (!reset_n) !(we && (rd_en || dec)));

  oc_driver u_oc_full (.en(cfg.dig.en_ramfull),     .in(full),                   .out_n(ramfull_n));

  assign dout_007        = dout_int;
  assign transmit_on_007 = transmit_on;
  assign ramfull_007     = full;

endmodule
