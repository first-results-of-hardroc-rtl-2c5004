// Testbench for slow_control_register: shifts a random 571-bit word in,
// checks every register bit and the decoded settings against the bit table
// (bit numbers 1..571), reads the word back through q and checks reset.
module tb_slow_control_register;
  import hardroc_pkg::*;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic ck = 0, rst_n = 0, d = 0, q;
  logic [SC_BITS-1:0] bits;
  sc_cfg_t cfg;
  bit seq [1:SC_BITS];   // seq[k] = table bit k, sent k-th

  slow_control_register dut (.ck(ck), .rst_n(rst_n), .d(d), .q(q), .bits(bits), .cfg(cfg));

  always #50 ck = ~ck;

  initial begin
    repeat (3000) @(posedge ck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 1; k <= SC_BITS; k++) seq[k] = 1'($urandom);
    #120 rst_n = 1;
    check(bits == '0, "reset clears register");
    for (int k = 1; k <= SC_BITS; k++) begin
      @(negedge ck) d = seq[k];
      @(posedge ck);
    end
    #1;
    for (int k = 1; k <= SC_BITS; k++) check(bits[k-1] == seq[k], $sformatf("bit %0d", k));
    check(cfg.dig.en_ramfull == seq[1] && cfg.dig.en_dout == seq[2] &&
          cfg.dig.en_transmit_on == seq[3] && cfg.dig.en_out_discri == seq[4], "bits 1-4");
    for (int i = 0; i < 8; i++) check(cfg.dig.header[i] == seq[5+i], $sformatf("Header %0d", i));
    check(cfg.dig.bypass_chip == seq[13], "bypass_chip");
    check(cfg.dig.en_out_trig_int == seq[14] && cfg.dig.en_trig_int == seq[15] &&
          cfg.dig.en_trig_ext == seq[16], "trigger enables");
    check(cfg.dig.en_out_raz_int == seq[17] && cfg.dig.en_raz_int == seq[18] &&
          cfg.dig.en_raz_ext == seq[19], "raz enables");
    for (int ch = 0; ch < 64; ch++) begin
      check(cfg.dig.valid_trig[ch] == seq[21+ch], $sformatf("Valid_trig %0d", ch));
      check(cfg.ana.test_ch[ch] == seq[108+ch], $sformatf("Test ch %0d", ch));
      for (int g = 0; g < 6; g++)
        check(cfg.ana.gain[ch][g] == seq[172 + 6*ch + g], $sformatf("gain ch %0d cmd%0d", ch, g));
    end
    for (int i = 0; i < 10; i++) begin
      check(cfg.ana.dac0[i] == seq[85+i], $sformatf("B0 %0d", i));
      check(cfg.ana.dac1[i] == seq[95+i], $sformatf("B1 %0d", i));
    end
    check(cfg.ana.on_otadac == seq[105] && cfg.ana.on_dac == seq[106] && cfg.ana.on_otabg == seq[107], "DAC power bits");
    for (int i = 0; i < 16; i++) check(cfg.ana.bias[i] == seq[556+i], $sformatf("bias bit %0d", 556+i));
    // read back: q shows table bit k before the k-th further clock
    for (int k = 1; k <= SC_BITS; k++) begin
      @(negedge ck) d = 0;
      check(q == seq[k], $sformatf("read back bit %0d", k));
      @(posedge ck);
    end
    #1 check(bits == '0, "register empty after read back");
    for (int k = 1; k <= 5; k++) begin @(negedge ck) d = 1; @(posedge ck); end
    #1 rst_n = 0;
    #1 check(bits == '0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
