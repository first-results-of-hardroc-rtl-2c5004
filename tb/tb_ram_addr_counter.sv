// Testbench for ram_addr_counter: fills to 128 (full, further writes
// ignored), checks write and read addresses, empties it (LIFO addresses)
// and checks clear and simultaneous inc/dec.
module tb_ram_addr_counter;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic clk = 0, rst_n = 0, inc = 0, dec = 0, clr = 0;
  logic [6:0] wr_addr, rd_addr;
  logic [7:0] count;
  logic full, empty;

  ram_addr_counter dut (.*);
  always #12.5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(logic i, logic d, logic c);
    @(negedge clk); inc = i; dec = d; clr = c;
    @(posedge clk); #1; inc = 0; dec = 0; clr = 0;
  endtask

  initial begin
    #30 rst_n = 1;
    check(empty && !full && count == 0, "reset: empty");
    for (int n = 0; n < 128; n++) begin
      check(wr_addr == 7'(n), $sformatf("write address %0d", n));
      op(1, 0, 0);
      check(count == 8'(n + 1), "count after write");
      check(rd_addr == 7'(n), "read address is the last written");
      check(full == (n == 127), "full only at 128");
    end
    op(1, 0, 0);
    check(count == 128 && full, "write ignored when full");
    op(1, 1, 0);
    check(count == 128, "inc with dec keeps count");
    for (int n = 127; n >= 0; n--) begin
      check(rd_addr == 7'(n), $sformatf("read address %0d", n));
      op(0, 1, 0);
      check(!full, "not full after a read");
    end
    check(empty && count == 0, "empty after 128 reads");
    op(0, 1, 0);
    check(empty && count == 0, "read ignored when empty");
    op(1, 0, 0); op(1, 0, 0); op(0, 0, 1);
    check(empty, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
