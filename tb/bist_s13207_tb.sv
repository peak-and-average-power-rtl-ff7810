// bist_s13207_tb: switching-activity run of bist_top at its default sizes
// (60-stage generator, 669 scan cells, 31 primary inputs: the full-scan
// s13207 configuration) for 5000 patterns, 3,350,669 clock cycles.
//
// The benchmark netlist is not available, so the CUT is a made-up
// combinational function. The test counts scan-cell toggles in every cycle of
// the design and, in parallel, of a conventional scan BIST model kept here:
// the same 60-stage LFSR feeding its cell c1 straight into a 669-cell chain,
// with the same schedule and CUT function. Shift toggles are split into those
// in cells already holding new pattern bits (set by the generator) and those
// in cells still holding the old response (set by the CUT and chain order).
// The bit-swapping version must halve (45-55 %) the first kind and have fewer
// shift toggles overall and a lower shift peak. Capture toggles are reported.
// The session must end after TL*(M+1) + M cycles.
module bist_s13207_tb;
  localparam int N  = 60;
  localparam int M  = 669;
  localparam int PI = 31;
  localparam int TL = 5000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] num_patterns = '0;
  logic [M-1:0] cut_state, cut_next;
  logic [PI-1:0] cut_pi;
  logic scan_en, scan_in, tpg_swapped, busy, done;
  logic [31:0] patterns_applied;
  logic [31:0] signature;
  int checks = 0, failures = 0;

  bist_top dut (
    .clk, .rst_n, .start, .num_patterns, .cut_state, .cut_next, .cut_pi,
    .scan_en, .scan_in, .tpg_swapped, .patterns_applied, .busy, .done, .signature
  );

  // Made-up CUT logic.
  always_comb
    for (int i = 0; i < M; i++)
      cut_next[i] = cut_state[(i + 1) % M] ^ (cut_state[(i + 7) % M] & cut_pi[i % PI]);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (TL * (M + 1) + M + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] cut_fn(logic [M-1:0] q, logic [PI-1:0] pi);
    logic [M-1:0] d;
    for (int i = 0; i < M; i++) d[i] = q[(i + 1) % M] ^ (q[(i + 7) % M] & pi[i % PI]);
    return d;
  endfunction

  initial begin
    logic [N:1]   base_lfsr;   // conventional LFSR, x^60 + x + 1
    logic [M-1:0] base_chain, nb, prev_state, load_mask;
    longint bs_sum, base_sum, bs_load, base_load, capt_sum, base_capt;
    int bs_pk, base_pk, capt_pk, t, tl, cycles, n_shift, n_capt;
    bit was_shift;
    bs_sum = 0; base_sum = 0; bs_load = 0; base_load = 0; capt_sum = 0; base_capt = 0;
    bs_pk = 0; base_pk = 0; capt_pk = 0;
    cycles = 0; n_shift = 0; n_capt = 0;
    base_lfsr = N'(1); base_chain = '0; load_mask = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    num_patterns = TL;
    start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    prev_state = cut_state;
    while (!done) begin
      was_shift = scan_en;
      // conventional scan BIST, same schedule: LFSR cell c1 into the chain
      if (scan_en) begin
        nb = {base_chain[M-2:0], base_lfsr[1]};
        load_mask = {load_mask[M-2:0], 1'b1};
        base_lfsr = {base_lfsr[N-1:1], base_lfsr[1] ^ base_lfsr[N]};
      end else begin
        logic [PI-1:0] pi;
        for (int k = 0; k < PI; k++) pi[k] = base_lfsr[k + 1];
        nb = cut_fn(base_chain, pi);
      end
      t = $countones(nb ^ base_chain);
      if (was_shift) begin
        base_sum += t; if (t > base_pk) base_pk = t;
        base_load += $countones((nb ^ base_chain) & load_mask);
      end else base_capt += t;
      base_chain = nb;
      @(posedge clk); #1;
      cycles++;
      t = $countones(cut_state ^ prev_state);
      if (was_shift) begin
        bs_sum += t; if (t > bs_pk) bs_pk = t; n_shift++;
        bs_load += $countones((cut_state ^ prev_state) & load_mask);
      end else begin
        capt_sum += t; if (t > capt_pk) capt_pk = t; n_capt++;
        load_mask = '0;
      end
      prev_state = cut_state;
    end
    $display("shift cycles %0d, capture cycles %0d", n_shift, n_capt);
    $display("conventional LFSR: shift toggles avg %0d.%02d peak %0d, of them in loaded cells avg %0d.%02d, capture avg %0d",
             base_sum / n_shift, (base_sum * 100 / n_shift) % 100, base_pk,
             base_load / n_shift, (base_load * 100 / n_shift) % 100, base_capt / n_capt);
    $display("bit-swapping LFSR: shift toggles avg %0d.%02d peak %0d, of them in loaded cells avg %0d.%02d, capture avg %0d peak %0d",
             bs_sum / n_shift, (bs_sum * 100 / n_shift) % 100, bs_pk,
             bs_load / n_shift, (bs_load * 100 / n_shift) % 100, capt_sum / n_capt, capt_pk);
    $display("savings: loaded cells %0d %%, all shift toggles %0d %%",
             100 - bs_load * 100 / base_load, 100 - bs_sum * 100 / base_sum);
    check(cycles == TL * (M + 1) + M, $sformatf("session took %0d cycles", cycles));
    check(n_capt == TL, "capture count");
    check(bs_load * 100 >= base_load * 45 && bs_load * 100 <= base_load * 55,
          "loaded-cell toggles halved");
    check(bs_sum < base_sum && bs_pk < base_pk, "lower total and peak shift toggles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
