// Testbench for write_sm: checks the cycle-exact event sequence (ValEvtOut 4
// periods, write in the next period, RazChnOut 1 period, 2 periods after
// ValEvtOut), the captured BCID, and that no event starts without
// acquisition, when full, or while one is in progress.
module tb_write_sm;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 0, rst_n = 0, trig = 0, acq = 0, full = 0;
  logic [23:0] bcid_in = 0, bcid_q;
  logic we, val_evt_out, raz_out, busy;

  write_sm dut (.*);
  always #12.5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // trigger pulse sampled at edge 0; record outputs for periods 1..10
  task automatic event_seq(logic [23:0] b, bit expect_event, int retrig_at);
    logic [9:0] v, w, r;
    @(negedge clk); trig = 1; bcid_in = b;
    @(negedge clk); trig = 0; bcid_in = ~b;
    for (int p = 1; p <= 10; p++) begin
      v[p-1] = val_evt_out; w[p-1] = we; r[p-1] = raz_out;
      if (p == retrig_at) trig = 1;
      @(negedge clk); trig = 0;
    end
    if (expect_event) begin
      check(v == 10'b00_0000_1111, $sformatf("ValEvtOut periods 1..4, got %b", v));
      check(w == 10'b00_0001_0000, $sformatf("write in period 5, got %b", w));
      check(r == 10'b00_0100_0000, $sformatf("RazChnOut in period 7, got %b", r));
      check(bcid_q == b, "BCID captured at the trigger");
    end else begin
      check(v == 0 && w == 0 && r == 0, "no event");
    end
  endtask

  initial begin
    #30 rst_n = 1;
    check(!busy && !val_evt_out && !we && !raz_out, "idle after reset");
    event_seq(24'h123456, 0, 0);          // acquisition off
    acq = 1;
    event_seq(24'h00ABCD, 1, 0);
    event_seq(24'h0F0F0F, 1, 3);          // trigger during the event is ignored
    check(!busy, "idle after event");
    full = 1;
    event_seq(24'h111111, 0, 0);          // memory full
    full = 0;
    for (int i = 0; i < 20; i++) event_seq(24'($urandom), 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
