// End-to-end testbench for hardroc_top at its full size: two chips share the
// RamFull*, TransmitOn* and Dout* lines and form a readout daisy chain
// (DAQ -> chip 0 StartReadOut, chip 0 EndReadOut -> chip 1 StartReadOut,
// chip 1 EndReadOut -> DAQ).
//
// 1. Both chips are configured through their slow-control ports (different
//    chip tags, channel 7 of chip 0 disabled), chip 0's word is read back
//    through Q_SC, and chip 0's read register selects channel 20 for the
//    probe outputs.
// 2. Acquisition at 5 MHz: internal triggers from D1 hits with D0 hits
//    alongside, an external trigger, a masked channel, an external RazChn.
//    ValEvtOut and RazChnOut lengths and spacing are measured on every event.
// 3. Chip 0 is filled to 128 frames: the shared RamFull* line falls and chip
//    1 stops taking events too.
// 4. Readout: every frame of both chips is decoded from the Dout* line and
//    compared with the frames the testbench predicted (chip tag, BCID counted
//    by the testbench from the bunch clock, hit bits), last frame first, one
//    bit per 8 periods of the 40 MHz clock.
// 5. Chip 1 is reconfigured as bypassed and the slow clock switched to 1 MHz;
//    StartReadOut is raised while chip 0 is storing an event. Only chip 0's
//    new frames are sent (40 periods per bit), the event being stored comes
//    first, and chip 1's EndReadOut follows its StartReadOut.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_hardroc_top;
  import hardroc_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------- clocks
  logic clk = 0;
  always #12.5 clk = ~clk;
  int div = 8;            // 40 MHz / div = slow clock
  int ph = 0;
  logic clk_slow = 0;
  logic start_acq = 0;
  int tb_bcid = 0;        // bunch count seen by the testbench
  always @(posedge clk) begin
    ph <= (ph + 1) % div;
    if ((ph + 1) % div == 0 && start_acq) tb_bcid <= tb_bcid + 1;
  end
  always @(negedge clk) clk_slow <= (ph < div / 2);
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- the two chips and the shared lines
  logic reset_n = 0, rst_counter_n = 0, val_evt = 1, raz_chn = 0, start_readout = 0;
  logic [1:0] trigger_ext = 0;
  logic [NCH-1:0] disc0 [2], disc1 [2];
  logic [1:0] val_evt_out, out_raz, out_trig_int, end_ro, dout_n, tx_n, full_n;
  logic [1:0] tp_d, tp_tx, tp_full;
  logic [1:0] ot0, ot1, ors0, ors1, sc_clk, sc_d, sc_q, r_d, r_q;
  logic sc_rst_n = 0, r_clk = 0;
  logic dout_line, tx_line, full_line;
  sc_ana_t cfg_ana [2];

  assign dout_line = &dout_n;
  assign tx_line   = &tx_n;
  assign full_line = &full_n;

  for (genvar c = 0; c < 2; c++) begin : g_chip
    hardroc_top u_chip (
      .clk_40m(clk), .clk_slow(clk_slow), .reset_n(reset_n), .rst_counter_n(rst_counter_n),
      .start_acq(start_acq), .val_evt(val_evt), .raz_chn(raz_chn), .trigger_ext(trigger_ext[c]),
      .disc0(disc0[c]), .disc1(disc1[c]),
      .val_evt_out(val_evt_out[c]), .out_raz_chn_int(out_raz[c]), .out_trig_int(out_trig_int[c]),
      .start_readout(c == 0 ? start_readout : end_ro[0]), .end_readout(end_ro[c]),
      .dout_n(dout_n[c]), .transmit_on_n(tx_n[c]), .ramfull_n(full_n[c]), .ramfull_ext_n(full_line),
      .dout_007(tp_d[c]), .transmit_on_007(tp_tx[c]), .ramfull_007(tp_full[c]),
      .out_trig0(ot0[c]), .out_trig1(ot1[c]), .out_rs_trig0(ors0[c]), .out_rs_trig1(ors1[c]),
      .sc_clk(sc_clk[c]), .sc_rst_n(sc_rst_n), .sc_d(sc_d[c]), .sc_q(sc_q[c]),
      .r_clk(r_clk), .r_rst_n(sc_rst_n), .r_d(r_d[c]), .r_q(r_q[c]),
      .cfg_ana(cfg_ana[c])
    );
  end

  // ---------------- mechanism counters
  int n_int_trig = 0, n_ext_trig = 0, n_masked = 0, n_raz_ext = 0, n_probe = 0;
  int n_deferred = 0, n_ramfull_stop = 0, n_daisy = 0, n_bypass = 0, n_1mhz = 0, n_events = 0;

  // ---------------- watchdog
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- ValEvtOut / RazChnOut timing monitor (both chips)
  for (genvar c = 0; c < 2; c++) begin : g_mon
    initial begin
      int len, gap;
      forever begin
        @(posedge clk iff val_evt_out[c]);
        len = 0;
        while (val_evt_out[c]) begin len++; @(posedge clk); end
        gap = 0;
        while (!out_raz[c] && gap < 20) begin gap++; @(posedge clk); end
        check(len == 4, $sformatf("chip %0d ValEvtOut %0d periods, expected 4", c, len));
        check(gap == 2, $sformatf("chip %0d RazChnOut %0d periods after ValEvtOut, expected 2", c, gap));
        @(posedge clk);
        check(!out_raz[c], "RazChnOut lasts one period");
        n_events++;
      end
    end
  end

  // ---------------- TriggerOut rising edges
  int n_trig_out = 0;
  always @(posedge out_trig_int[0] or posedge out_trig_int[1]) n_trig_out++;

  // ---------------- test points match the open-collector outputs (all enabled)
  initial begin
    @(posedge reset_n);
    forever begin
      repeat (61) @(negedge clk);
      for (int c = 0; c < 2; c++)
        check(tp_d[c] == !dout_n[c] && tp_tx[c] == !tx_n[c] && tp_full[c] == !full_n[c],
              $sformatf("chip %0d test points", c));
    end
  end

  // ---------------- predicted frames
  typedef struct { logic [7:0] hdr; int bcid; logic [127:0] hits; } exp_t;
  exp_t exp_q [2][$];
  logic [7:0] tag [2] = '{8'hA5, 8'h3C};

  // ---------------- slow control
  function automatic logic [SC_BITS:1] sc_word(int c, bit bypass);
    logic [SC_BITS:1] w = '0;
    w[1] = 1; w[2] = 1; w[3] = 1; w[4] = 1;
    for (int i = 0; i < 8; i++) w[5+i] = tag[c][i];
    w[13] = bypass;
    w[14] = 1; w[15] = 1; w[16] = 1; w[17] = 1; w[18] = 1; w[19] = 1;
    for (int ch = 0; ch < 64; ch++) w[21+ch] = !(c == 0 && ch == 7);
    for (int i = 0; i < 10; i++) w[85+i] = (i % 2 == 0);     // some DAC code
    return w;
  endfunction

  // verify: the word already loaded is the same; check it as it shifts out
  task automatic load_sc(int c, bit bypass, bit verify = 0);
    logic [SC_BITS:1] w = sc_word(c, bypass);
    for (int k = 1; k <= SC_BITS; k++) begin
      if (verify) check(sc_q[c] == w[k], $sformatf("chip %0d slow control read back bit %0d", c, k));
      sc_d[c] = w[k];
      #40 sc_clk[c] = 1;
      #40 sc_clk[c] = 0;
    end
  endtask

  task automatic load_rr(int sel_ch);
    for (int k = 0; k < 64; k++) begin
      r_d = {1'b0, 1'(k == 63 - sel_ch)};
      #40 r_clk = 1;
      #40 r_clk = 0;
    end
  endtask

  // wait until the bunch clock is mid-period, away from BCID changes
  task automatic mid_bunch();
    @(negedge clk iff ph == div / 2);
  endtask

  // one event attempt: drive hits for two periods, wait for it to finish
  task automatic inject(int c, logic [63:0] d0, logic [63:0] d1, bit ext, bit expect_event);
    int ev0 = n_events;
    int b;
    mid_bunch();
    b = tb_bcid;
    disc0[c] = d0; disc1[c] = d1; trigger_ext[c] = ext;
    @(negedge clk); @(negedge clk);
    disc0[c] = '0; disc1[c] = '0; trigger_ext[c] = 0;
    repeat (40) @(negedge clk);
    check((n_events - ev0) == int'(expect_event), $sformatf("chip %0d event expected=%0d", c, expect_event));
    if (expect_event) begin
      exp_t e;
      e.hdr = tag[c];
      e.bcid = b;
      for (int ch = 0; ch < 64; ch++) e.hits[2*ch +: 2] = {d1[ch], d0[ch]};
      exp_q[c].push_back(e);
    end
  endtask

  // ---------------- readout decoding
  task automatic readout(int exp_chip_frames [2], bit chip1_bypassed);
    int bits, t;
    logic [159:0] f;
    exp_t e;
    int chip;
    int windows = 0;
    int end_seen;
    @(negedge clk) start_readout = 1;
    fork
      begin repeat (div) @(negedge clk); start_readout = 0; end
    join_none
    for (int c = 0; c < 2; c++) begin
      if (exp_chip_frames[c] == 0) continue;
      // wait for this chip's transmission window
      t = 0;
      while (tx_line && t < 20 * div) begin t++; @(negedge clk); end
      check(!tx_line, $sformatf("chip %0d starts transmitting", c));
      check(tx_n[c] == 0 && tx_n[1-c] == 1, $sformatf("chip %0d holds TransmitOn", c));
      windows++;
      bits = 0;
      t = 0;
      while (!tx_line) begin
        if (t % div == div / 2) begin
          f = {f[158:0], ~dout_line};
          bits++;
          if (bits % 160 == 0) begin
            e = exp_q[c].pop_back();   // last stored frame comes first
            check(f[159:152] == e.hdr, $sformatf("chip %0d header %h expected %h", c, f[159:152], e.hdr));
            check(f[151:128] == 24'(e.bcid), $sformatf("chip %0d BCID %0d expected %0d", c, f[151:128], e.bcid));
            check(f[127:0] == e.hits, $sformatf("chip %0d hits %h expected %h", c, f[127:0], e.hits));
          end
        end
        t++;
        @(negedge clk);
      end
      check(t == exp_chip_frames[c] * 160 * div,
            $sformatf("chip %0d TransmitOn %0d periods, expected %0d", c, t, exp_chip_frames[c] * 160 * div));
      check(bits == exp_chip_frames[c] * 160, "bit count");
      if (div == 40) n_1mhz++;
    end
    // the DAQ sees the end of the chain
    end_seen = 0;
    t = 0;
    while (!end_ro[1] && t < 40 * div) begin t++; @(negedge clk); end
    check(end_ro[1], "EndReadOut reaches the DAQ");
    if (end_ro[1]) n_daisy++;
    if (chip1_bypassed) begin
      check(end_ro[0] == end_ro[1], "bypassed chip passes StartReadOut to EndReadOut");
      check(exp_q[1].size() != 0, "bypassed chip keeps its frames");
      n_bypass++;
    end
    repeat (2 * div) @(negedge clk);
    check(tx_line && dout_line, "lines released after readout");
  endtask

  int nf [2];
  logic [63:0] pat0, pat1;
  int ch;
  int bc;

  initial begin
    for (int c = 0; c < 2; c++) begin disc0[c] = '0; disc1[c] = '0; end
    sc_clk = '0; sc_d = '0; r_d = '0;
    #100 sc_rst_n = 1;
    fork load_sc(0, 0); load_sc(1, 0); join
    load_sc(0, 0, 1);                  // read back while reloading
    load_rr(20);
    check(cfg_ana[0].dac0 == 10'b0101010101, "analog settings reach cfg_ana");
    @(negedge clk) reset_n = 1; rst_counter_n = 1;
    repeat (20) @(negedge clk);
    mid_bunch();
    start_acq = 1;
    repeat (3 * div) @(negedge clk);

    // internal triggers with D0 hits alongside
    inject(0, 64'h0000_0000_0000_0011, 64'h8000_0000_0000_0001, 0, 1); n_int_trig++;
    inject(1, 64'h0F00_0000_0000_0000, 64'h0000_0001_0000_0000, 0, 1); n_int_trig++;
    // external trigger, no hit
    inject(1, '0, '0, 1, 1); n_ext_trig++;
    // masked channel 7 of chip 0: no event
    inject(0, '0, 64'h80, 0, 0); n_masked++;
    // D0 alone does not trigger; it is held until an external RazChn
    inject(0, 64'h8, '0, 0, 0);
    @(negedge clk) raz_chn = 1;
    @(negedge clk) raz_chn = 0;
    repeat (3) @(negedge clk);
    inject(0, '0, 64'h400, 0, 1); n_raz_ext++;
    // probe lines of chip 0 show channel 20 only (these hits also make events)
    mid_bunch();
    bc = tb_bcid;
    disc1[0] = 64'(1) << 20;
    @(negedge clk);
    check(ot1[0] && !ot0[0], "direct probe of the selected channel");
    @(negedge clk); disc1[0] = '0;
    #1 check(ors1[0] && !ot1[0], "held probe of the selected channel");
    exp_q[0].push_back('{tag[0], bc, 128'(1) << 41});
    repeat (40) @(negedge clk);
    mid_bunch();
    bc = tb_bcid;
    disc1[0] = 64'(1) << 21;
    @(negedge clk);
    check(!ot1[0], "unselected channel stays off the probe line");
    @(negedge clk); disc1[0] = '0;
    #1 check(!ors1[0], "unselected channel's held hit stays off the probe line");
    exp_q[0].push_back('{tag[0], bc, 128'(1) << 43});
    n_probe++;
    repeat (40) @(negedge clk);

    // fill chip 0 to 128 frames
    while (exp_q[0].size() < 128) begin
      ch = $urandom_range(0, 63);
      if (ch == 7) ch = 8;
      pat1 = 64'(1) << ch;
      pat0 = {$urandom, $urandom} & {32'h0, 32'hFFFF_FF7F};
      inject(0, pat0, pat1, 0, 1); n_int_trig++;
    end
    check(!full_line, "RamFull* line low with 128 frames");
    check(!full_n[0], "chip 0 drives RamFull*");
    inject(0, '0, 64'h1, 0, 0);
    inject(1, '0, 64'h1, 0, 0);       // chip 1 stopped by the shared line
    n_ramfull_stop++;
    @(negedge clk) raz_chn = 1;        // clear chip 1's unrecorded hit
    @(negedge clk) raz_chn = 0;
    mid_bunch();
    start_acq = 0;
    repeat (4 * div) @(negedge clk);

    nf[0] = exp_q[0].size();
    nf[1] = exp_q[1].size();
    check(nf[0] == 128 && nf[1] == 2, "frames stored before readout");
    readout(nf, 0);
    check(full_line, "RamFull* released after readout");

    // bypass chip 1, readout at 1 MHz
    fork load_sc(1, 1); join
    mid_bunch();
    start_acq = 1;
    repeat (2 * div) @(negedge clk);
    inject(0, '0, 64'h2, 0, 1);
    inject(0, 64'h4, 64'h8000, 0, 1);
    inject(1, '0, 64'h10, 0, 1);
    @(negedge clk iff ph == 0);
    div = 40;
    ph = 0;
    repeat (2 * div) @(negedge clk);
    // StartReadOut arrives while chip 0 is storing an event: the readout
    // waits for the frame, which is then sent first
    nf[0] = 3;
    nf[1] = 0;
    fork
      inject(0, 64'h1, 64'h4000, 0, 1);
      begin
        @(posedge val_evt_out[0]);
        @(negedge clk);
        check(val_evt_out[0], "StartReadOut raised during an event");
        n_deferred++;
        readout(nf, 1);
      end
    join
    mid_bunch();
    start_acq = 0;

    // every event had one TriggerOut edge; two more came from the triggers
    // refused while RamFull* was low
    check(n_trig_out == n_events + 2, $sformatf("TriggerOut edges %0d, events %0d", n_trig_out, n_events));
    check(n_int_trig > 0, "internal trigger happened");
    check(n_ext_trig > 0, "external trigger happened");
    check(n_masked > 0, "masked channel happened");
    check(n_raz_ext > 0, "external RazChn happened");
    check(n_probe > 0, "probe lines happened");
    check(n_ramfull_stop > 0, "RamFull stop happened");
    check(n_daisy >= 2, "daisy-chained readouts happened");
    check(n_bypass > 0, "bypass happened");
    check(n_1mhz > 0, "1 MHz readout happened");
    check(n_deferred > 0, "readout requested during an event happened");
    $display("mechanisms: int_trig=%0d ext_trig=%0d masked=%0d raz_ext=%0d probe=%0d ramfull_stop=%0d daisy=%0d bypass=%0d readout_1MHz=%0d deferred_readout=%0d events=%0d",
             n_int_trig, n_ext_trig, n_masked, n_raz_ext, n_probe, n_ramfull_stop, n_daisy, n_bypass, n_1mhz, n_deferred, n_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
