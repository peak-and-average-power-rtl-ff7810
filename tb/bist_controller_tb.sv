// bist_controller_tb: self-checking test of bist_controller with M = 5.
// Sessions of TL = 3, 1 and 0 patterns are run; the test counts cycles from
// start to done (TL*(M+1) + M expected), shift, capture and compaction
// cycles, checks that each capture follows exactly M shifts and that the
// first load is not compacted.
module bist_controller_tb;
  localparam int M = 5;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] num_patterns = '0;
  logic tpg_en, tpg_load, scan_en, chain_en, sig_en, sig_clear, capture, busy, done;
  logic [31:0] patterns_applied;
  int checks = 0, failures = 0;

  bist_controller #(.M(M)) dut (.clk, .rst_n, .start, .num_patterns, .tpg_en, .tpg_load, .scan_en,
    .chain_en, .sig_en, .sig_clear, .capture, .busy, .done, .patterns_applied);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic session(int tl);
    int cycles, n_shift, n_capt, n_sig, run, n_load;
    bit bad_run, sig_in_first;
    cycles = 0; n_shift = 0; n_capt = 0; n_sig = 0; run = 0; n_load = 0;
    bad_run = 0; sig_in_first = 0;
    num_patterns = 32'(tl);
    start = 1'b1;
    #1;
    check(tpg_load && sig_clear, "start reseeds and clears");
    @(posedge clk); #1 start = 1'b0;
    while (!done && cycles < 1000) begin
      cycles++;
      check(busy, "busy during session");
      if (tpg_en) begin
        n_shift++; run++;
        check(scan_en && chain_en, "shift drives the chain");
        if (n_capt == 0 && sig_en) sig_in_first = 1;
      end
      if (capture) begin
        n_capt++;
        if (run != M) bad_run = 1;
        run = 0;
        check(!scan_en && chain_en && !tpg_en && !sig_en, "capture cycle controls");
      end
      n_sig += int'(sig_en);
      @(posedge clk); #1;
    end
    check(cycles == tl * (M + 1) + (tl > 0 ? M : 0), $sformatf("TL=%0d: %0d cycles", tl, cycles));
    check(n_capt == tl, $sformatf("TL=%0d: %0d captures", tl, n_capt));
    check(n_shift == (tl > 0 ? (tl + 1) * M : 0), $sformatf("TL=%0d: %0d shifts", tl, n_shift));
    check(n_sig == (tl > 0 ? tl * M : 0), $sformatf("TL=%0d: %0d compaction cycles", tl, n_sig));
    check(!bad_run, "each capture follows M shifts");
    check(!sig_in_first, "first load not compacted");
    check(patterns_applied == 32'(tl), "patterns_applied");
    check(done && !busy, "done");
    repeat (3) @(posedge clk); #1;
    check(done, "done holds");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!busy && !done, "idle after reset");
    session(3);
    session(1);
    session(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
