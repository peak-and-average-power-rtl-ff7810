// sig_analyzer_tb: self-checking test of sig_analyzer at its default width.
// The reference treats the register as an integer: shift left, add the
// polynomial (with its x^0 term) when the top bit falls out, add the input
// bit. Random streams with enable gaps and a clear are compared each cycle,
// and a single flipped bit in a stream must change the signature.
module sig_analyzer_tb;
  import bist_pkg::*;
  localparam int W = SIG_W_DEF;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, en = 1'b0, din = 1'b0;
  logic [W-1:0] signature;
  int checks = 0, failures = 0;

  sig_analyzer dut (.clk, .rst_n, .clear, .en, .din, .signature);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [W-1:0] ref_step(logic [W-1:0] s, logic d);
    logic [W:0] wide;
    wide = {s, 1'b0} ^ W'(d);
    if (s[W-1]) wide ^= {SIG_POLY_DEF, 1'b1};
    return wide[W-1:0];
  endfunction

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ref_s, sig_a;
    bit stream [200];
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(signature == '0, "reset to zero");
    ref_s = '0;
    for (int t = 0; t < 600; t++) begin
      din   = 1'($urandom);
      en    = ($urandom % 5) != 0;
      clear = (t == 300);
      @(posedge clk); #1;
      if (clear) ref_s = '0;
      else if (en) ref_s = ref_step(ref_s, din);
      check(signature == ref_s, $sformatf("step %0d: %h vs %h", t, signature, ref_s));
    end
    clear = 1'b0;
    // aliasing check: one flipped response bit must show in the signature
    foreach (stream[i]) stream[i] = 1'($urandom);
    for (int pass = 0; pass < 2; pass++) begin
      clear = 1'b1; en = 1'b0; @(posedge clk); #1 clear = 1'b0;
      en = 1'b1;
      foreach (stream[i]) begin
        din = stream[i] ^ (pass == 1 && i == 77);
        @(posedge clk); #1;
      end
      en = 1'b0;
      if (pass == 0) sig_a = signature;
    end
    check(signature != sig_a, "single-bit error detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
