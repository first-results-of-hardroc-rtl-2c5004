// Testbench for readout_sm with the address counter, RAM and serializer
// around it: stores N random frames, sends StartReadOut and checks that the
// frames arrive last-in first-out, MSB first, one bit per slow-clock period
// (8 periods of the 40 MHz clock at 5 MHz), with TransmitOn high for exactly
// N*160 slow periods and EndReadOut high for one slow period afterwards. An
// empty memory gives EndReadOut alone.
module tb_readout_sm;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int W = 160;
  logic clk = 0, rst_n = 0;
  logic start = 0, tick = 0;
  logic rd_en, dec, load, shift, transmit_on, end_readout, busy;
  logic inc = 0, full, empty;
  logic [6:0] wr_addr, rd_addr;
  logic [7:0] count;
  logic [W-1:0] wdata = 0, rdata;
  logic dout;

  readout_sm dut (.clk, .rst_n, .start, .tick, .empty, .rd_en, .dec, .load, .shift,
                  .transmit_on, .end_readout, .busy);
  ram_addr_counter u_cnt (.clk, .rst_n, .inc, .dec, .clr(1'b0), .wr_addr, .rd_addr, .count, .full, .empty);
  event_ram u_ram (.clk, .we(inc), .waddr(wr_addr), .wdata, .rd_en, .raddr(rd_addr), .rdata);
  serializer u_ser (.clk, .rst_n, .load, .din(rdata), .shift, .dout);

  always #12.5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
  end
  // 5 MHz tick every 8 periods
  always @(negedge clk) tick <= (cyc % 8) == 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] frames [$];

  task automatic run(int n);
    int tx_cyc, bits, ticks_end, t0;
    logic [W-1:0] exp_f;
    frames.delete();
    for (int i = 0; i < n; i++) begin
      exp_f = {$urandom, $urandom, $urandom, $urandom, $urandom};
      frames.push_back(exp_f);
      @(negedge clk); inc = 1; wdata = exp_f;
      @(negedge clk); inc = 0;
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    t0 = cyc;
    tx_cyc = 0; bits = 0;
    // wait for transmission; sample each bit in the middle of its period
    while (!transmit_on && !end_readout && cyc - t0 < 100) @(negedge clk);
    check(n == 0 ? end_readout : transmit_on, "transmission or end starts");
    while (transmit_on) begin
      if (tx_cyc % 8 == 4) begin
        exp_f = frames[$ - (bits / W)];
        check(dout == exp_f[W-1 - (bits % W)], $sformatf("bit %0d", bits));
        bits++;
      end
      tx_cyc++;
      @(negedge clk);
    end
    check(tx_cyc == n * W * 8, $sformatf("TransmitOn %0d periods, expected %0d", tx_cyc, n * W * 8));
    check(bits == n * W, "bit count");
    ticks_end = 0;
    while (end_readout) begin ticks_end++; @(negedge clk); end
    check(ticks_end == 8, $sformatf("EndReadOut %0d periods, expected 8", ticks_end));
    check(empty && !busy, "memory empty and machine idle after readout");
  endtask

  initial begin
    #30 rst_n = 1;
    repeat (3) @(negedge clk);
    run(0);
    run(1);
    run(3);
    run(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
