// Testbench for channel_trigger: drives random discriminator, ValEvt, RazChn,
// Valid_trig and read_trig values and compares the held hits and the probe
// outputs with a cycle model of the set/reset memory, plus directed cases.
module tb_channel_trigger;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 0, rst_n = 0;
  logic [1:0] disc = 0;
  logic val_evt = 0, raz = 0, valid = 0, read_trig = 0;
  logic [1:0] hit, direct_out, rs_out;
  logic [1:0] model = 0;

  channel_trigger dut (.*);
  always #12.5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic [1:0] d, logic v, logic r, logic ok, logic rt);
    @(negedge clk);
    disc = d; val_evt = v; raz = r; valid = ok; read_trig = rt;
    #1;
    check(direct_out == (rt ? d : 2'b00), "direct probe output");
    check(rs_out == (rt ? model : 2'b00), "latched probe output");
    @(posedge clk);
    if (r) model = 0;
    else if (v && ok) model = model | d;
    #1 check(hit == model, $sformatf("hit %b expected %b", hit, model));
  endtask

  initial begin
    #30 rst_n = 1;
    check(hit == 0, "reset");
    // directed: D1 hit held after the pulse ends, D0 added, cleared by RazChn
    step(2'b10, 1, 0, 1, 0);  check(hit == 2'b10, "D1 set");
    step(2'b00, 1, 0, 1, 0);  check(hit == 2'b10, "D1 held");
    step(2'b01, 1, 0, 1, 1);  check(hit == 2'b11, "D0 set");
    step(2'b11, 1, 1, 1, 1);  check(hit == 2'b00, "RazChn clears, wins over set");
    step(2'b11, 0, 0, 1, 0);  check(hit == 2'b00, "no set without ValEvt");
    step(2'b11, 1, 0, 0, 0);  check(hit == 2'b00, "bad channel masked by Valid_trig");
    for (int i = 0; i < 2000; i++)
      step(2'($urandom), 1'($urandom_range(0, 3) != 0), 1'($urandom_range(0, 7) == 0),
           1'($urandom_range(0, 5) != 0), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
