// bit_swap_tb: exhaustive test of bit_swap for both swap polarities.
// The outputs must be the inputs crossed over exactly when sel equals the
// polarity, and passed straight otherwise.
module bit_swap_tb;
  logic a, b, sel, o1_0, o2_0, o1_1, o2_1;
  int checks = 0, failures = 0;

  bit_swap #(.SWAP_ON(1'b0)) dut0 (.a, .b, .sel, .o1(o1_0), .o2(o2_0));
  bit_swap #(.SWAP_ON(1'b1)) dut1 (.a, .b, .sel, .o1(o1_1), .o2(o2_1));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, b, a} = 3'(v);
      #1;
      // polarity 0: swap when sel = 0
      check(o1_0 == (sel ? a : b) && o2_0 == (sel ? b : a), $sformatf("pol0 v=%0d", v));
      // polarity 1: swap when sel = 1
      check(o1_1 == (sel ? b : a) && o2_1 == (sel ? a : b), $sformatf("pol1 v=%0d", v));
      // the pair is always a permutation of {a, b}
      check((o1_0 + o2_0) == (a + b), $sformatf("ones kept v=%0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
