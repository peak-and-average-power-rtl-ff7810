// bist_top_full_tb: end-to-end test of bist_top with every parameter at its
// default: 60-stage generator on x^60 + x + 1 with c1/c2 swapped under c60,
// 669 scan cells in identity order without inverters, 31 primary inputs and
// a 32-bit signature. One session of 200 patterns is run against a reference
// model written here (same structure as the reduced-size test), checking every
// scan-in bit, every applied vector and primary-input pattern, the signature
// and the cycle count TL*(M+1) + M. The scan input must toggle about half as
// often as a plain LFSR cell.
module bist_top_full_tb;
  import bist_pkg::*;

  localparam int N  = 60;
  localparam int M  = 669;
  localparam int PI = 31;
  localparam int TL = 200;

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

  // Made-up CUT logic: each flip-flop takes a mix of two others and a PI.
  function automatic logic [M-1:0] cut_logic(logic [M-1:0] q, logic [PI-1:0] pi);
    logic [M-1:0] d;
    for (int i = 0; i < M; i++)
      d[i] = q[(i + 1) % M] ^ (q[(i + 5) % M] & pi[i % PI]) ^ (i % 3 == 0);
    return d;
  endfunction

  assign cut_next = cut_logic(cut_state, cut_pi);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----
  logic [N:1] r_lfsr;        // c1..cN, 1-based
  logic [M-1:0] r_chain;     // by chain position
  logic [31:0] r_sig;
  int n_swap, n_comp, tog_scan, tog_c1, n_tpg, n_capt;

  function automatic logic r_scan_bit(logic [N:1] c);
    return (c[N] == 1'b0) ? c[1] : c[2];        // o2 of the c1/c2 swap under cN
  endfunction
  function automatic logic [N-1:0] r_pattern(logic [N:1] c);
    logic [N-1:0] p;
    for (int k = 1; k <= N; k++) p[k-1] = c[k];
    if (c[N] == 1'b0)
      for (int k = 1; k + 1 <= N - 1; k += 2) begin p[k-1] = c[k+1]; p[k] = c[k]; end
    return p;
  endfunction
  function automatic logic [M-1:0] r_state(logic [M-1:0] ch);
    logic [M-1:0] q;
    q = ch;                                    // identity order
    return q;
  endfunction

  task automatic r_shift(bit compact);
    logic b, prev_b, prev_c1;
    b = r_scan_bit(r_lfsr);
    if (compact) begin
      logic [32:0] w;
      w = {r_sig, 1'b0} ^ 33'(r_chain[M-1]);
      if (r_sig[31]) w ^= {SIG_POLY_DEF, 1'b1};
      r_sig = w[31:0];
      n_comp++;
    end
    r_chain = {r_chain[M-2:0], b};
    n_swap += int'(r_lfsr[N] == 1'b0);
    prev_b = b; prev_c1 = r_lfsr[1];
    r_lfsr = {r_lfsr[N-1:1], r_lfsr[1] ^ r_lfsr[N]};
    tog_scan += int'(r_scan_bit(r_lfsr) != prev_b);
    tog_c1   += int'(r_lfsr[1] != prev_c1);
    n_tpg++;
  endtask

  task automatic session(int tl, output int cycles);
    int n_shift_dut, n_capt_dut;
    n_shift_dut = 0; n_capt_dut = 0; cycles = 0;
    r_lfsr = N'(1);                          // default seed: c1 = 1
    r_sig  = '0;
    num_patterns = 32'(tl);
    start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    for (int k = 0; k < tl; k++) begin
      for (int s = 0; s < M; s++) begin
        check(scan_in == r_scan_bit(r_lfsr), $sformatf("pattern %0d shift %0d scan_in", k, s));
        check(tpg_swapped == (r_lfsr[N] == 1'b0), "swap flag");
        check(scan_en && busy, "shifting");
        r_shift(k > 0);
        n_shift_dut += int'(scan_en);
        @(posedge clk); #1;
        cycles++;
      end
      // capture cycle
      check(!scan_en, $sformatf("pattern %0d capture", k));
      check(cut_state == r_state(r_chain), $sformatf("pattern %0d applied vector", k));
      check(cut_pi == r_pattern(r_lfsr)[PI-1:0], $sformatf("pattern %0d primary inputs", k));
      begin
        logic [M-1:0] d;
        d = cut_logic(r_state(r_chain), r_pattern(r_lfsr)[PI-1:0]);
        r_chain = d;
      end
      n_capt_dut += int'(!scan_en);
      n_capt++;
      @(posedge clk); #1;
      cycles++;
      check(patterns_applied == 32'(k + 1), "patterns_applied");
    end
    if (tl > 0)
      for (int s = 0; s < M; s++) begin
        check(scan_en && busy, "unloading");
        r_shift(1'b1);
        @(posedge clk); #1;
        cycles++;
      end
    check(done && !busy, $sformatf("TL=%0d done", tl));
    check(signature == r_sig, $sformatf("TL=%0d signature %h vs %h", tl, signature, r_sig));
    check(n_capt_dut == tl && n_shift_dut == tl * M, "shift and capture counts");
  endtask

  initial begin
    int cyc;
    n_capt = 0; n_swap = 0; n_comp = 0; tog_scan = 0; tog_c1 = 0; n_tpg = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    session(TL, cyc);
    check(cyc == TL * (M + 1) + M, $sformatf("TL=%0d took %0d cycles", TL, cyc));
    check(tog_scan * 100 >= tog_c1 * 45 && tog_scan * 100 <= tog_c1 * 55,
          $sformatf("scan_in toggles %0d vs LFSR cell %0d", tog_scan, tog_c1));
    $display("scan_in transitions %0d, plain LFSR cell %0d over %0d steps", tog_scan, tog_c1, n_tpg);
    // every mechanism must have happened
    check(n_swap > 0,  $sformatf("swap cycles: %0d", n_swap));
    check(n_comp > 0,  $sformatf("compacted bits: %0d", n_comp));
    check(n_tpg > 0,   $sformatf("shift cycles: %0d", n_tpg));
    check(n_capt > 0,  $sformatf("capture cycles: %0d", n_capt));
    $display("mechanisms: shifts=%0d captures=%0d swaps=%0d compacted=%0d",
             n_tpg, n_capt, n_swap, n_comp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
