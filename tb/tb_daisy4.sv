// Four-chip readout board: four hardroc_top instances chained
// DAQ -> chip 0 -> chip 1 -> chip 2 -> chip 3 -> DAQ on StartReadOut /
// EndReadOut, sharing the Dout*, TransmitOn* and RamFull* lines. Each chip
// gets its own tag and a different number of events (one gets none, one is
// triggered externally); a single StartReadOut from the DAQ must bring every
// frame out on the shared line, chip after chip, last frame first, with a
// correct tag, BCID and hit pattern, and end with EndReadOut from chip 3.
module tb_daisy4;
  import hardroc_pkg::*;

  localparam int NCHIP = 4;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic clk = 0;
  always #12.5 clk = ~clk;
  localparam int DIV = 8;
  int ph = 0;
  logic clk_slow = 0, start_acq = 0;
  int tb_bcid = 0;
  always @(posedge clk) begin
    ph <= (ph + 1) % DIV;
    if ((ph + 1) % DIV == 0 && start_acq) tb_bcid <= tb_bcid + 1;
  end
  always @(negedge clk) clk_slow <= (ph < DIV / 2);

  logic reset_n = 0, start_readout = 0, sc_rst_n = 0;
  logic [NCHIP-1:0] trigger_ext = '0, end_ro, dout_n, tx_n, full_n, sc_clk = '0, sc_d = '0;
  logic [NCHIP-1:0] tp_d, tp_tx, tp_full;
  logic [NCHIP-1:0] ve_o, raz_o, tr_o, ot0, ot1, ors0, ors1, sc_q, r_q;
  logic [NCH-1:0] disc0 [NCHIP], disc1 [NCHIP];
  sc_ana_t cfg_ana [NCHIP];
  logic dout_line, tx_line, full_line;
  assign dout_line = &dout_n;
  assign tx_line   = &tx_n;
  assign full_line = &full_n;

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    hardroc_top u_chip (
      .clk_40m(clk), .clk_slow(clk_slow), .reset_n(reset_n), .rst_counter_n(reset_n),
      .start_acq(start_acq), .val_evt(1'b1), .raz_chn(1'b0), .trigger_ext(trigger_ext[c]),
      .disc0(disc0[c]), .disc1(disc1[c]),
      .val_evt_out(ve_o[c]), .out_raz_chn_int(raz_o[c]), .out_trig_int(tr_o[c]),
      .start_readout(c == 0 ? start_readout : end_ro[c == 0 ? 0 : c-1]), .end_readout(end_ro[c]),
      .dout_n(dout_n[c]), .transmit_on_n(tx_n[c]), .ramfull_n(full_n[c]), .ramfull_ext_n(full_line),
      .dout_007(tp_d[c]), .transmit_on_007(tp_tx[c]), .ramfull_007(tp_full[c]),
      .out_trig0(ot0[c]), .out_trig1(ot1[c]), .out_rs_trig0(ors0[c]), .out_rs_trig1(ors1[c]),
      .sc_clk(sc_clk[c]), .sc_rst_n(sc_rst_n), .sc_d(sc_d[c]), .sc_q(sc_q[c]),
      .r_clk(1'b0), .r_rst_n(sc_rst_n), .r_d(1'b0), .r_q(r_q[c]),
      .cfg_ana(cfg_ana[c])
    );
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [7:0] hdr; int bcid; logic [127:0] hits; } exp_t;
  exp_t exp_q [NCHIP][$];

  function automatic logic [7:0] tag(int c);
    return 8'h10 * 8'(c + 1) + 8'(c);
  endfunction

  task automatic load_sc(int c);
    logic [SC_BITS:1] w = '0;
    w[1] = 1; w[2] = 1; w[3] = 1;
    for (int i = 0; i < 8; i++) w[5+i] = tag(c)[i];
    w[15] = 1; w[16] = 1; w[18] = 1;
    for (int ch = 0; ch < 64; ch++) w[21+ch] = 1;
    for (int k = 1; k <= SC_BITS; k++) begin
      sc_d[c] = w[k];
      #40 sc_clk[c] = 1;
      #40 sc_clk[c] = 0;
    end
  endtask

  task automatic inject(int c, logic [63:0] d0, logic [63:0] d1, bit ext);
    exp_t e;
    @(negedge clk iff ph == DIV / 2);
    e.hdr = tag(c); e.bcid = tb_bcid;
    for (int ch = 0; ch < 64; ch++) e.hits[2*ch +: 2] = {d1[ch], d0[ch]};
    exp_q[c].push_back(e);
    disc0[c] = d0; disc1[c] = d1; trigger_ext[c] = ext;
    @(negedge clk); @(negedge clk);
    disc0[c] = '0; disc1[c] = '0; trigger_ext[c] = 0;
    repeat (40) @(negedge clk);
  endtask

  int nev [NCHIP] = '{3, 0, 2, 5};
  int windows = 0;

  initial begin
    logic [159:0] f;
    exp_t e;
    int t, bits, c;
    for (int i = 0; i < NCHIP; i++) begin disc0[i] = '0; disc1[i] = '0; end
    #100 sc_rst_n = 1;
    fork
      load_sc(0); load_sc(1); load_sc(2); load_sc(3);
    join
    @(negedge clk) reset_n = 1;
    repeat (20) @(negedge clk);
    @(negedge clk iff ph == DIV / 2) start_acq = 1;
    repeat (2 * DIV) @(negedge clk);
    for (int i = 0; i < NCHIP; i++)
      for (int n = 0; n < nev[i]; n++)
        if (i == 2 && n == 1) inject(i, '0, '0, 1);    // external trigger
        else inject(i, {$urandom, $urandom}, 64'(1) << $urandom_range(0, 63), 0);
    @(negedge clk iff ph == DIV / 2) start_acq = 0;
    repeat (4 * DIV) @(negedge clk);

    @(negedge clk) start_readout = 1;
    fork begin repeat (DIV) @(negedge clk); start_readout = 0; end join_none
    for (c = 0; c < NCHIP; c++) begin
      if (nev[c] == 0) continue;
      t = 0;
      while (tx_line && t < 40 * DIV) begin t++; @(negedge clk); end
      check(!tx_n[c], $sformatf("chip %0d transmits in its turn", c));
      windows++;
      t = 0; bits = 0;
      while (!tx_line) begin
        if (t % DIV == DIV / 2) begin
          f = {f[158:0], ~dout_line};
          bits++;
          if (bits % 160 == 0) begin
            e = exp_q[c].pop_back();
            check(f[159:152] == e.hdr, $sformatf("chip %0d tag %h expected %h", c, f[159:152], e.hdr));
            check(f[151:128] == 24'(e.bcid), $sformatf("chip %0d BCID %0d expected %0d", c, f[151:128], e.bcid));
            check(f[127:0] == e.hits, $sformatf("chip %0d hits", c));
          end
        end
        t++;
        @(negedge clk);
      end
      check(t == nev[c] * 160 * DIV, $sformatf("chip %0d window %0d periods", c, t));
    end
    t = 0;
    while (!end_ro[NCHIP-1] && t < 40 * DIV) begin t++; @(negedge clk); end
    check(end_ro[NCHIP-1], "EndReadOut of the last chip reaches the DAQ");
    check(windows == 3, "three chips with data transmitted");
    for (int i = 0; i < NCHIP; i++) check(exp_q[i].size() == 0, $sformatf("all frames of chip %0d read", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
