// lfsr_tb: self-checking test of lfsr.
//
// Two 7-stage instances run the primitive trinomial x^7 + x + 1, one in
// external and one in internal form. Every step is compared with a reference
// update written here; the period must be exactly 2^7 - 1, every cell must
// toggle 2^6 times per period, and en = 0 / load must hold / reseed.
module lfsr_tb;
  import bist_pkg::*;

  localparam int N = 7;
  localparam logic [N-1:0] POLY = 7'b100_0001;   // x^7 + x + 1
  localparam logic [N-1:0] SEED = 7'b000_0001;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, load = 1'b0;
  logic [N-1:0] st_e, st_i;
  int checks = 0, failures = 0;

  lfsr #(.N(N), .POLY(POLY), .KIND(LFSR_EXTERNAL), .SEED(SEED)) dut_e (.clk, .rst_n, .en, .load, .state(st_e));
  lfsr #(.N(N), .POLY(POLY), .KIND(LFSR_INTERNAL), .SEED(SEED)) dut_i (.clk, .rst_n, .en, .load, .state(st_i));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference for the external form: new c1 = c1 ^ c7 for x^7 + x + 1.
  function automatic logic [N-1:0] ref_ext(logic [N-1:0] s);
    return {s[N-2:0], s[0] ^ s[N-1]};
  endfunction
  // Reference for the internal form: cN fed to c1 and into c2 (the x^1 tap).
  function automatic logic [N-1:0] ref_int(logic [N-1:0] s);
    logic [N-1:0] r;
    r = s << 1;
    r[0] = s[N-1];
    r[1] = s[0] ^ s[N-1];
    return r;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] exp_e, exp_i, prev_e;
    int period_e, period_i;
    int tog [N];
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(st_e == SEED && st_i == SEED, "reset value");
    foreach (tog[k]) tog[k] = 0;
    period_e = 0; period_i = 0;
    en = 1'b1;
    for (int t = 1; t <= 200; t++) begin
      exp_e = ref_ext(st_e); exp_i = ref_int(st_i); prev_e = st_e;
      @(posedge clk); #1;
      check(st_e == exp_e, $sformatf("external step %0d: %b vs %b", t, st_e, exp_e));
      check(st_i == exp_i, $sformatf("internal step %0d: %b vs %b", t, st_i, exp_i));
      if (period_e == 0) for (int k = 0; k < N; k++) tog[k] += int'(st_e[k] != prev_e[k]);
      if (period_e == 0 && st_e == SEED) period_e = t;
      if (period_i == 0 && st_i == SEED) period_i = t;
    end
    check(period_e == 127, $sformatf("external period %0d", period_e));
    check(period_i == 127, $sformatf("internal period %0d", period_i));
    for (int k = 0; k < N; k++) check(tog[k] == 64, $sformatf("cell %0d toggles %0d per period", k + 1, tog[k]));
    // hold
    en = 1'b0; exp_e = st_e;
    repeat (3) @(posedge clk); #1;
    check(st_e == exp_e, "hold with en = 0");
    // reseed
    load = 1'b1; @(posedge clk); #1 load = 1'b0;
    check(st_e == SEED && st_i == SEED, "load reseeds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
