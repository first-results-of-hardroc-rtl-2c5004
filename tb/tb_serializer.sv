// Testbench for serializer: loads random 160-bit frames and checks that the
// bits leave MSB first, one per shift, with idle cycles between shifts.
module tb_serializer;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 0, rst_n = 0, load = 0, shift = 0, dout;
  logic [159:0] din = 0;

  serializer dut (.*);
  always #12.5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [159:0] f;
    #30 rst_n = 1;
    check(dout == 0, "reset");
    for (int n = 0; n < 6; n++) begin
      f = {$urandom, $urandom, $urandom, $urandom, $urandom};
      @(negedge clk); load = 1; din = f;
      @(negedge clk); load = 0; din = ~f;
      for (int b = 159; b >= 0; b--) begin
        check(dout == f[b], $sformatf("frame %0d bit %0d", n, b));
        repeat ($urandom_range(0, 3)) @(negedge clk);   // no shift: bit holds
        check(dout == f[b], "bit holds without shift");
        shift = 1; @(negedge clk); shift = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
