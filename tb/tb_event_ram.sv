// Testbench for event_ram: writes 128 random 160-bit frames, reads them back
// in random order (one-cycle read latency) and checks that a write does not
// disturb other words and that rdata holds without rd_en.
module tb_event_ram;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 0, we = 0, rd_en = 0;
  logic [6:0] waddr = 0, raddr = 0;
  logic [159:0] wdata = 0, rdata;
  logic [159:0] ref_mem [128];

  event_ram dut (.*);
  always #12.5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [159:0] rnd160();
    return {$urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic rd(int a);
    @(negedge clk); rd_en = 1; raddr = 7'(a);
    @(posedge clk); #1 rd_en = 0;
    check(rdata == ref_mem[a], $sformatf("read word %0d", a));
  endtask

  initial begin
    for (int a = 0; a < 128; a++) begin
      ref_mem[a] = rnd160();
      @(negedge clk); we = 1; waddr = 7'(a); wdata = ref_mem[a];
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < 128; a++) rd(a);
    for (int i = 0; i < 300; i++) rd($urandom_range(0, 127));
    ref_mem[77] = rnd160();
    @(negedge clk); we = 1; waddr = 77; wdata = ref_mem[77];
    @(negedge clk); we = 0;
    rd(76); rd(77); rd(78);
    raddr = 5;
    repeat (3) @(posedge clk);
    #1 check(rdata == ref_mem[78], "rdata holds without rd_en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
