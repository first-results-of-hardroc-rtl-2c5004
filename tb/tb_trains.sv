// Several bunch trains in a row on two chained chips: each train resets the
// bunch counters, takes a random number of events per chip (random hit
// patterns, some triggers external), then reads both chips out at 5 MHz or
// 1 MHz chosen at random. Every frame is checked against the prediction and
// both memories must be empty after each readout, so the next train starts
// clean.
module tb_trains;
  import hardroc_pkg::*;

  localparam int NCHIP = 2;
  localparam int NTRAIN = 5;
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
  int div = 8;
  int ph = 0;
  logic clk_slow = 0, start_acq = 0, rst_counter_n = 0;
  int tb_bcid = 0;
  always @(posedge clk) begin
    ph <= (ph + 1) % div;
    if (!rst_counter_n) tb_bcid <= 0;
    else if ((ph + 1) % div == 0 && start_acq) tb_bcid <= tb_bcid + 1;
  end
  always @(negedge clk) clk_slow <= (ph < div / 2);

  logic reset_n = 0, start_readout = 0, sc_rst_n = 0;
  logic [NCHIP-1:0] trigger_ext = '0, end_ro, dout_n, tx_n, full_n, sc_clk = '0, sc_d = '0;
  logic [NCHIP-1:0] tp_d, tp_tx, tp_full, ve_o, raz_o, tr_o, ot0, ot1, ors0, ors1, sc_q, r_q;
  logic [NCH-1:0] disc0 [NCHIP], disc1 [NCHIP];
  sc_ana_t cfg_ana [NCHIP];
  logic dout_line, tx_line, full_line;
  assign dout_line = &dout_n;
  assign tx_line   = &tx_n;
  assign full_line = &full_n;

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    hardroc_top u_chip (
      .clk_40m(clk), .clk_slow(clk_slow), .reset_n(reset_n), .rst_counter_n(rst_counter_n),
      .start_acq(start_acq), .val_evt(1'b1), .raz_chn(1'b0), .trigger_ext(trigger_ext[c]),
      .disc0(disc0[c]), .disc1(disc1[c]),
      .val_evt_out(ve_o[c]), .out_raz_chn_int(raz_o[c]), .out_trig_int(tr_o[c]),
      .start_readout(c == 0 ? start_readout : end_ro[0]), .end_readout(end_ro[c]),
      .dout_n(dout_n[c]), .transmit_on_n(tx_n[c]), .ramfull_n(full_n[c]), .ramfull_ext_n(full_line),
      .dout_007(tp_d[c]), .transmit_on_007(tp_tx[c]), .ramfull_007(tp_full[c]),
      .out_trig0(ot0[c]), .out_trig1(ot1[c]), .out_rs_trig0(ors0[c]), .out_rs_trig1(ors1[c]),
      .sc_clk(sc_clk[c]), .sc_rst_n(sc_rst_n), .sc_d(sc_d[c]), .sc_q(sc_q[c]),
      .r_clk(1'b0), .r_rst_n(sc_rst_n), .r_d(1'b0), .r_q(r_q[c]),
      .cfg_ana(cfg_ana[c])
    );
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [7:0] hdr; int bcid; logic [127:0] hits; } exp_t;
  exp_t exp_q [NCHIP][$];

  function automatic logic [7:0] tag(int c);
    return 8'hC0 | 8'(c);
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
    @(negedge clk iff ph == div / 2);
    e.hdr = tag(c); e.bcid = tb_bcid;
    for (int ch = 0; ch < 64; ch++) e.hits[2*ch +: 2] = {d1[ch], d0[ch]};
    exp_q[c].push_back(e);
    disc0[c] = d0; disc1[c] = d1; trigger_ext[c] = ext;
    @(negedge clk); @(negedge clk);
    disc0[c] = '0; disc1[c] = '0; trigger_ext[c] = 0;
    repeat ($urandom_range(12, 60)) @(negedge clk);
  endtask

  int n_frames = 0;

  task automatic readout(int nev [NCHIP]);
    logic [159:0] f;
    exp_t e;
    int t, bits;
    @(negedge clk) start_readout = 1;
    fork begin repeat (div) @(negedge clk); start_readout = 0; end join_none
    for (int c = 0; c < NCHIP; c++) begin
      if (nev[c] == 0) continue;
      t = 0;
      while (tx_line && t < 40 * div) begin t++; @(negedge clk); end
      check(!tx_n[c], $sformatf("chip %0d transmits in its turn", c));
      t = 0; bits = 0;
      while (!tx_line) begin
        if (t % div == div / 2) begin
          f = {f[158:0], ~dout_line};
          bits++;
          if (bits % 160 == 0) begin
            e = exp_q[c].pop_back();
            check(f == {e.hdr, 24'(e.bcid), e.hits}, $sformatf("chip %0d frame", c));
            n_frames++;
          end
        end
        t++;
        @(negedge clk);
      end
      check(t == nev[c] * 160 * div, $sformatf("chip %0d window %0d periods", c, t));
    end
    t = 0;
    while (!end_ro[NCHIP-1] && t < 40 * div) begin t++; @(negedge clk); end
    check(end_ro[NCHIP-1], "EndReadOut reaches the DAQ");
    for (int c = 0; c < NCHIP; c++) check(exp_q[c].size() == 0, "all frames read");
    repeat (2 * div) @(negedge clk);
  endtask

  initial begin
    int nev [NCHIP];
    for (int i = 0; i < NCHIP; i++) begin disc0[i] = '0; disc1[i] = '0; end
    #100 sc_rst_n = 1;
    fork load_sc(0); load_sc(1); join
    @(negedge clk) reset_n = 1;
    for (int tr = 0; tr < NTRAIN; tr++) begin
      div = 8;
      @(negedge clk iff ph == 0);
      rst_counter_n = 0;
      @(negedge clk) rst_counter_n = 1;
      repeat ($urandom_range(1, 30)) @(negedge clk);
      @(negedge clk iff ph == div / 2) start_acq = 1;
      repeat ($urandom_range(2, 20) * div) @(negedge clk);
      for (int c = 0; c < NCHIP; c++) nev[c] = $urandom_range(0, 12);
      for (int c = 0; c < NCHIP; c++)
        for (int n = 0; n < nev[c]; n++)
          if ($urandom_range(0, 4) == 0) inject(c, '0, '0, 1);
          else inject(c, {$urandom, $urandom}, 64'(1) << $urandom_range(0, 63) | {$urandom, $urandom} & {$urandom, $urandom}, 0);
      @(negedge clk iff ph == div / 2) start_acq = 0;
      repeat (4 * div) @(negedge clk);
      if ($urandom_range(0, 1) == 1) begin
        @(negedge clk iff ph == 0);
        div = 40;
        ph = 0;
      end
      repeat (2 * div) @(negedge clk);
      readout(nev);
      check(full_line, "RamFull* high after readout");
    end
    check(n_frames > 0, "frames were read");
    $display("trains=%0d frames=%0d", NTRAIN, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
