// Testbench for synchro: each asynchronous input edge must give one pulse
// (or, for StartAcq, a level) exactly STAGES = 2 clock edges later, and a
// 5 MHz slow clock one tick every 8 periods of the 40 MHz clock.
module tb_synchro;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 0, rst_n = 0;
  logic trigger = 0, start_acq = 0, start_readout = 0, clk_slow = 0;
  logic acq, trig_rise, ro_rise, slow_rise;

  synchro dut (.*);
  always #12.5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // raise one input between edges, count edges until the output shows it
  task automatic latency(int which);
    int n;
    logic seen;
    @(negedge clk);
    case (which)
      0: trigger = 1;
      1: start_acq = 1;
      2: start_readout = 1;
      default: clk_slow = 1;
    endcase
    n = 0;
    seen = 0;
    while (!seen && n < 10) begin
      @(posedge clk); n++; #1;
      case (which)
        0: seen = trig_rise;
        1: seen = acq;
        2: seen = ro_rise;
        default: seen = slow_rise;
      endcase
    end
    check(n == 2, $sformatf("input %0d latency %0d, expected 2", which, n));
    @(posedge clk); #1;
    case (which)
      0: check(!trig_rise, "trigger pulse lasts one cycle");
      1: check(acq, "acq is a level");
      2: check(!ro_rise, "StartReadOut pulse lasts one cycle");
      default: check(!slow_rise, "slow tick lasts one cycle");
    endcase
    repeat (4) @(posedge clk);
    @(negedge clk);
    trigger = 0; start_readout = 0; clk_slow = 0;
    repeat (5) @(posedge clk);
    #1 check(!trig_rise && !ro_rise && !slow_rise, "no pulse on a falling edge");
  endtask

  int ticks;
  initial begin
    #40 rst_n = 1;
    for (int w = 0; w < 4; w++) latency(w);
    start_acq = 0;
    repeat (4) @(posedge clk);
    #1 check(!acq, "acq follows StartAcq low");
    // 5 MHz slow clock, derived as 1/8 of the 40 MHz clock
    ticks = 0;
    fork
      begin
        for (int i = 0; i < 8 * 40; i++) begin
          @(negedge clk);
          clk_slow = ((i % 8) < 4);
        end
      end
      begin
        repeat (8 * 40) begin @(posedge clk); #1 if (slow_rise) ticks++; end
      end
    join
    check(ticks == 40 || ticks == 39, $sformatf("slow ticks %0d over 40 periods", ticks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
