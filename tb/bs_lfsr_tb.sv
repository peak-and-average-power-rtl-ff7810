// bs_lfsr_tb: self-checking test of the bit-swapping LFSR.
//
// Four 7-stage instances run one full period (2^7 - 1 steps) each:
//   A: external x^7 + x + 1, c1/c2 swapped under c7, output o2 (default form)
//   B: external x^7 + x^6 + 1, c6/c7 swapped under c1, output o1
//   C: internal x^7 + x + 1, c1/c7 swapped under c2, output o2
//   D: internal x^7 + x^6 + 1, c1/c7 swapped under c6, output o1
// In every case a plain LFSR cell toggles 2^6 = 64 times per period and the
// chosen multiplexer output must toggle 2^5 = 32 times (half), with 64 ones.
// Each cycle the serial output of A is compared with a mux computed here from
// its LFSR cells. The parallel output of A must visit all 127 non-zero
// vectors once, with 3 pairs x 2^5 = 96 fewer transitions than the LFSR cells.
// A second phase runs three more arrangements over their own full periods:
//   E: external x^5 + x^2 + 1, c1/c2 swapped under c5, output o1
//   F: internal x^5 + x^3 + 1, c4/c5 swapped under c3, output o1
//   G: internal x^8 + x^7 + x^2 + x + 1, c1/c8 swapped under c7, output o1
// where the output must toggle 2^(n-2) times against 2^(n-1) for a cell.
module bs_lfsr_tb;
  import bist_pkg::*;

  localparam int N = 7;
  localparam int P = 127;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, load = 1'b0;
  logic [3:0] sb, sw;
  logic [N-1:0] pat [4];
  logic [N-1:0] st  [4];
  int checks = 0, failures = 0;

  bs_lfsr #(.N(N), .POLY(7'b100_0001), .KIND(LFSR_EXTERNAL), .SWAP_A(1), .SWAP_B(2), .SEL(7), .OUT_O2(1'b1))
    dut_a (.clk, .rst_n, .en, .load, .scan_bit(sb[0]), .swapped(sw[0]), .pattern(pat[0]), .lfsr_state(st[0]));
  bs_lfsr #(.N(N), .POLY(7'b110_0000), .KIND(LFSR_EXTERNAL), .SWAP_A(6), .SWAP_B(7), .SEL(1), .OUT_O2(1'b0))
    dut_b (.clk, .rst_n, .en, .load, .scan_bit(sb[1]), .swapped(sw[1]), .pattern(pat[1]), .lfsr_state(st[1]));
  bs_lfsr #(.N(N), .POLY(7'b100_0001), .KIND(LFSR_INTERNAL), .SWAP_A(1), .SWAP_B(7), .SEL(2), .OUT_O2(1'b1))
    dut_c (.clk, .rst_n, .en, .load, .scan_bit(sb[2]), .swapped(sw[2]), .pattern(pat[2]), .lfsr_state(st[2]));
  bs_lfsr #(.N(N), .POLY(7'b110_0000), .KIND(LFSR_INTERNAL), .SWAP_A(1), .SWAP_B(7), .SEL(6), .OUT_O2(1'b0))
    dut_d (.clk, .rst_n, .en, .load, .scan_bit(sb[3]), .swapped(sw[3]), .pattern(pat[3]), .lfsr_state(st[3]));

  // second phase
  logic en2 = 1'b0;
  logic [2:0] sb2;
  logic [4:0] st_e, st_f, pat_e, pat_f;
  logic [7:0] st_g, pat_g;
  logic [2:0] unused_sw2;
  bs_lfsr #(.N(5), .POLY(5'b1_0010), .KIND(LFSR_EXTERNAL), .SWAP_A(1), .SWAP_B(2), .SEL(5), .OUT_O2(1'b0))
    dut_e (.clk, .rst_n, .en(en2), .load, .scan_bit(sb2[0]), .swapped(unused_sw2[0]), .pattern(pat_e), .lfsr_state(st_e));
  bs_lfsr #(.N(5), .POLY(5'b1_0100), .KIND(LFSR_INTERNAL), .SWAP_A(4), .SWAP_B(5), .SEL(3), .OUT_O2(1'b0))
    dut_f (.clk, .rst_n, .en(en2), .load, .scan_bit(sb2[1]), .swapped(unused_sw2[1]), .pattern(pat_f), .lfsr_state(st_f));
  bs_lfsr #(.N(8), .POLY(8'b1100_0011), .KIND(LFSR_INTERNAL), .SWAP_A(1), .SWAP_B(8), .SEL(7), .OUT_O2(1'b0))
    dut_g (.clk, .rst_n, .en(en2), .load, .scan_bit(sb2[2]), .swapped(unused_sw2[2]), .pattern(pat_g), .lfsr_state(st_g));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tog_sb [4], tog_c1 [4], ones [4];
    int tog_pat, tog_lfsr, distinct, swaps;
    bit [P:0] seen;
    logic [3:0] prev_sb;
    logic [N-1:0] prev_st [4];
    logic [N-1:0] prev_pat;
    logic exp_sb;
    foreach (tog_sb[i]) begin tog_sb[i] = 0; tog_c1[i] = 0; ones[i] = 0; end
    tog_pat = 0; tog_lfsr = 0; distinct = 0; swaps = 0; seen = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    en = 1'b1;
    for (int t = 0; t <= P; t++) begin
      // serial output of A against a mux built here: swap c1/c2 when c7 = 0
      exp_sb = (st[0][6] == 1'b0) ? st[0][0] : st[0][1];
      check(sb[0] == exp_sb, $sformatf("A scan_bit at step %0d", t));
      check(sw[0] == !st[0][6], $sformatf("A swapped flag at step %0d", t));
      if (t < P) begin
        for (int i = 0; i < 4; i++) ones[i] += int'(sb[i]);
        swaps += int'(sw[0]);
        if (!seen[pat[0]]) distinct++;
        seen[pat[0]] = 1'b1;
      end
      if (t > 0) begin
        for (int i = 0; i < 4; i++) begin
          tog_sb[i] += int'(sb[i] != prev_sb[i]);
          tog_c1[i] += int'(st[i][0] != prev_st[i][0]);
        end
        tog_pat  += $countones(pat[0] ^ prev_pat);
        tog_lfsr += $countones(st[0] ^ prev_st[0]);
      end
      prev_sb = sb; prev_pat = pat[0];
      foreach (prev_st[i]) prev_st[i] = st[i];
      @(posedge clk); #1;
    end
    for (int i = 0; i < 4; i++) begin
      check(tog_c1[i] == 64, $sformatf("case %0d: LFSR cell toggles %0d, want 64", i, tog_c1[i]));
      check(tog_sb[i] == 32, $sformatf("case %0d: swapped output toggles %0d, want 32", i, tog_sb[i]));
      check(ones[i] == 64, $sformatf("case %0d: ones %0d, want 64", i, ones[i]));
    end
    check(swaps == 63, $sformatf("swap cycles %0d, want 63 (c7 = 0)", swaps));
    check(distinct == P && !seen[0], $sformatf("parallel pattern visits %0d distinct vectors", distinct));
    check(tog_lfsr == 7 * 64, $sformatf("LFSR transitions %0d", tog_lfsr));
    check(tog_pat == 7 * 64 - 3 * 32, $sformatf("parallel pattern transitions %0d, want %0d", tog_pat, 7 * 64 - 3 * 32));
    // second phase: E, F (period 31) and G (period 255)
    en = 1'b0;
    begin
      int per [3], tog2 [3], togc [3];
      logic [2:0] p_sb;
      logic [2:0] p_c1;
      per = '{31, 31, 255};
      foreach (tog2[i]) begin tog2[i] = 0; togc[i] = 0; end
      en2 = 1'b1;
      p_sb = sb2; p_c1 = {st_g[0], st_f[0], st_e[0]};
      for (int t = 1; t <= 255; t++) begin
        @(posedge clk); #1;
        for (int i = 0; i < 3; i++)
          if (t <= per[i]) begin
            tog2[i] += int'(sb2[i] != p_sb[i]);
            togc[i] += int'((i == 0 ? st_e[0] : i == 1 ? st_f[0] : st_g[0]) != p_c1[i]);
          end
        p_sb = sb2; p_c1 = {st_g[0], st_f[0], st_e[0]};
        if (t == 31) check(st_e == 5'd1 && st_f == 5'd1, "period 31 for E and F");
      end
      check(st_g == 8'd1, "period 255 for G");
      check(togc[0] == 16 && tog2[0] == 8, $sformatf("E: cell %0d, output %0d toggles", togc[0], tog2[0]));
      check(togc[1] == 16 && tog2[1] == 8, $sformatf("F: cell %0d, output %0d toggles", togc[1], tog2[1]));
      check(togc[2] == 128 && tog2[2] == 64, $sformatf("G: cell %0d, output %0d toggles", togc[2], tog2[2]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
