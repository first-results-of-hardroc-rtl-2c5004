// Testbench for trigger_ctrl: OR64 of the D1 hits and the trigger selection,
// directed cases and random vectors.
module tb_trigger_ctrl;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [63:0] hit1;
  logic trigger_ext, en_trig_int, en_trig_ext, en_out_trig_int;
  logic or64, trigger, trigger_out;
  logic clk = 0;

  trigger_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [63:0] h, logic te, logic ei, logic ee, logic eo);
    bit any;
    bit exp_t;
    hit1 = h; trigger_ext = te; en_trig_int = ei; en_trig_ext = ee; en_out_trig_int = eo;
    @(posedge clk);
    any = 0;
    for (int i = 0; i < 64; i++) if (h[i]) any = 1;
    exp_t = (ei && any) || (ee && te);
    check(or64 == any, "OR64");
    check(trigger == exp_t, "trigger");
    check(trigger_out == (eo && exp_t), "TriggerOut");
  endtask

  initial begin
    for (int ch = 0; ch < 64; ch++) apply(64'(1) << ch, 0, 1, 0, 1);   // every channel alone
    apply('0, 1, 1, 0, 1);          // external ignored when only internal enabled
    apply('0, 1, 0, 1, 1);          // external selected
    apply(64'hFFFF, 0, 0, 1, 1);    // internal ignored when only external enabled
    apply(64'h8000_0000_0000_0000, 0, 1, 1, 0); // output disabled
    for (int i = 0; i < 3000; i++)
      apply(($urandom_range(0, 3) == 0) ? 64'(1) << $urandom_range(0, 63) :
            (($urandom_range(0, 1) == 0) ? '0 : {$urandom, $urandom}),
            1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
