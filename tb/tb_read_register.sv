// Testbench for read_register: shifts a random 64-bit selection in and checks
// which channels are selected, the Q_R output and reset.
module tb_read_register;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic ck = 0, rst_n = 0, d = 0, q;
  logic [63:0] sel;
  bit seq [64];

  read_register dut (.ck(ck), .rst_n(rst_n), .d(d), .q(q), .sel(sel));
  always #50 ck = ~ck;

  initial begin
    repeat (500) @(posedge ck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) seq[k] = 1'($urandom);
    #120 rst_n = 1;
    check(sel == '0 && q == 0, "reset");
    for (int k = 0; k < 64; k++) begin
      @(negedge ck) d = seq[k];
      @(posedge ck);
    end
    #1;
    // the first bit sent travels to the last channel
    for (int ch = 0; ch < 64; ch++) check(sel[ch] == seq[63-ch], $sformatf("channel %0d", ch));
    check(q == seq[0], "Q_R is the first bit sent");
    // shifting on reads the whole selection back through Q_R
    for (int k = 0; k < 64; k++) begin
      @(negedge ck) d = 0;
      check(q == seq[k], $sformatf("Q_R read back bit %0d", k));
      @(posedge ck);
    end
    // one-hot selection of channel 5
    for (int k = 0; k < 64; k++) begin
      @(negedge ck) d = (k == 63 - 5);
      @(posedge ck);
    end
    #1 check(sel == 64'(1) << 5, "single channel 5 selected");
    rst_n = 0;
    #1 check(sel == '0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
