// Testbench for oc_driver: truth table of the open-collector pad with its
// pull-up, and two pads sharing one line (wired AND).
module tb_oc_driver;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic en, in, out_n, en2, in2, out2_n;
  oc_driver dut  (.en(en),  .in(in),  .out_n(out_n));
  oc_driver dut2 (.en(en2), .in(in2), .out_n(out2_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {en, in, en2, in2} = 4'(i);
      #10;
      check(out_n == !(en && in), $sformatf("pad en=%0d in=%0d", en, in));
      // line is low when any enabled pad drives a one
      check((out_n & out2_n) == !((en && in) || (en2 && in2)), "shared line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
