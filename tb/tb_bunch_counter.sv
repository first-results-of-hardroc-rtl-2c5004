// Testbench for bunch_counter: counts ticks only while enabled, resets on
// Bunch Cnt Reset*, and wraps at 2^24 (checked with a narrower instance).
module tb_bunch_counter;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 0, rst_n = 0, tick = 0, en = 0;
  logic [23:0] bcid;
  logic [3:0]  bcid4;
  int model = 0;
  int model4 = 0;

  bunch_counter dut (.clk(clk), .rst_n(rst_n), .tick(tick), .en(en), .bcid(bcid));
  bunch_counter #(.W(4)) dut4 (.clk(clk), .rst_n(rst_n), .tick(tick), .en(1'b1), .bcid(bcid4));

  always #12.5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30 rst_n = 1;
    check(bcid == 0, "reset value");
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      tick = ((i % 8) == 0) || ($urandom_range(0, 9) == 0);
      en   = (i > 100) && ($urandom_range(0, 9) != 0);
      @(posedge clk);
      if (tick && en) model++;
      if (tick) model4 = (model4 + 1) % 16;
      #1;
      check(bcid == 24'(model), $sformatf("bcid %0d expected %0d", bcid, model));
      check(bcid4 == 4'(model4), "narrow counter wraps");
    end
    @(negedge clk) rst_n = 0;
    #1 check(bcid == 0, "Bunch Cnt Reset*");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
