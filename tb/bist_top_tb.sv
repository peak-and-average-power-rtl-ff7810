// bist_top_tb: end-to-end test of bist_top at reduced size (7-stage
// generator, 16 scan cells, 5 primary inputs, a scrambled chain order and
// four inverted links).
//
// A small made-up combinational CUT model closes the loop between cut_state,
// cut_pi and cut_next. A reference model written here from scratch (its own
// LFSR, swap rule, chain by position, inverters, capture through the CUT
// model and serial signature) predicts every scan_in bit, cut_state, the
// signature and the cycle count. Sessions of TL = 127, 1 and 0 patterns are
// run. The test counts each mechanism: shift and capture cycles, swapping
// cycles, inverted links taking effect, compacted bits, done; and it checks
// that the scan input toggles about half as often as a plain LFSR cell.
module bist_top_tb;
  import bist_pkg::*;

  localparam int N  = 7;
  localparam logic [N-1:0] POLY = 7'b100_0001;   // x^7 + x + 1
  localparam int M  = 16;
  localparam int PI = 5;
  localparam logic [M-1:0][31:0] ORDER = {32'd9, 32'd3, 32'd14, 32'd0, 32'd7, 32'd12, 32'd5, 32'd1,
                                           32'd15, 32'd10, 32'd2, 32'd8, 32'd13, 32'd4, 32'd11, 32'd6};
  localparam logic [M-1:0] INV = 16'b0010_0000_1001_0010;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] num_patterns = '0;
  logic [M-1:0] cut_state, cut_next;
  logic [PI-1:0] cut_pi;
  logic scan_en, scan_in, tpg_swapped, busy, done;
  logic [31:0] patterns_applied;
  logic [31:0] signature;
  int checks = 0, failures = 0;

  bist_top #(.N(N), .POLY(POLY), .M(M), .ORDER(ORDER), .INV(INV), .PI(PI)) dut (
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
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----
  logic [N:1] r_lfsr;        // c1..cN, 1-based
  logic [M-1:0] r_chain;     // by chain position
  logic [31:0] r_sig;
  int n_swap, n_inv, n_comp, tog_scan, tog_c1, n_tpg, n_capt;

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
    for (int p = 0; p < M; p++) q[ORDER[p]] = ch[p];
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
    for (int p = 0; p < M; p++) if (INV[p] && ((p == 0 ? b : r_chain[p-1]) == 1'b1)) n_inv++;
    r_chain = {r_chain[M-2:0], b} ^ INV;
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
    r_lfsr = N'(1);
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
        for (int p = 0; p < M; p++) r_chain[p] = d[ORDER[p]];
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
    n_capt = 0; n_swap = 0; n_inv = 0; n_comp = 0; tog_scan = 0; tog_c1 = 0; n_tpg = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    session(127, cyc);
    check(cyc == 127 * (M + 1) + M, $sformatf("TL=127 took %0d cycles", cyc));
    // transition saving on the scan input over 2048 generator steps
    check(tog_scan * 100 >= tog_c1 * 45 && tog_scan * 100 <= tog_c1 * 55,
          $sformatf("scan_in toggles %0d vs LFSR cell %0d", tog_scan, tog_c1));
    $display("scan_in transitions %0d, plain LFSR cell %0d over %0d steps", tog_scan, tog_c1, n_tpg);
    session(1, cyc);
    check(cyc == M + 1 + M, "TL=1 cycles");
    session(0, cyc);
    check(cyc == 0, "TL=0 ends at once");
    // every mechanism must have happened
    check(n_swap > 0,  $sformatf("swap cycles: %0d", n_swap));
    check(n_inv > 0,   $sformatf("inverted links carrying a one: %0d", n_inv));
    check(n_comp > 0,  $sformatf("compacted bits: %0d", n_comp));
    check(n_tpg > 0,   $sformatf("shift cycles: %0d", n_tpg));
    check(n_capt > 0,  $sformatf("capture cycles: %0d", n_capt));
    $display("mechanisms: shifts=%0d captures=%0d swaps=%0d inverted=%0d compacted=%0d",
             n_tpg, n_capt, n_swap, n_inv, n_comp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
