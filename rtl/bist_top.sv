// bist_top: low-power test-per-scan BIST built around a bit-swapping LFSR.
//
// The bit-swapping LFSR (bs_lfsr) feeds its low-transition output into the
// scan chain, so that about half as many scan cells toggle while a pattern is
// shifted in as with a plain LFSR. The scan chain (scan_chain) is ordered, and
// may place inverters on chosen links, so that shifting out responses and the
// capture cycle also switch fewer cells. The chain output is compacted by a
// serial signature register (sig_analyzer), and bist_controller sequences
// M shift cycles and one capture cycle per pattern. The CUT's combinational
// logic is outside: cut_state gives it the scan cells (by flip-flop), it
// returns cut_next, and its primary inputs are taken from the generator's
// parallel (test-per-clock) outputs, which use the same c1/c2 swap under cN.
// The default sizes (60-stage generator with x^60 + x + 1, 669 scan cells,
// 31 primary inputs) are those of the largest benchmark that this trinomial
// fits; the signature width, the controller and the primary-input wiring are
// this design's choices.
//
// Interface and timing: pulse start with num_patterns = TL; done rises
// TL*(M+1) + M cycles later with the final signature. scan_en = 0 marks the
// capture cycle, in which cut_pi is held stable. scan_in, tpg_swapped and
// patterns_applied are brought out for observation: the bit entering the
// chain, whether the swap multiplexers currently cross, and the captures done.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned           N       = TPG_N,
  parameter logic [N-1:0]          POLY    = TPG_POLY,
  parameter lfsr_kind_e            KIND    = LFSR_EXTERNAL,
  parameter logic [N-1:0]          SEED    = N'(1),
  parameter int unsigned           SWAP_A  = 1,
  parameter int unsigned           SWAP_B  = 2,
  parameter int unsigned           SEL     = N,
  parameter bit                    OUT_O2  = 1'b1,
  parameter bit                    SWAP_ON = 1'b0,
  parameter int unsigned           M       = 669,
  parameter logic [M-1:0][31:0]    ORDER   = identity_order(),
  parameter logic [M-1:0]          INV     = '0,
  parameter int unsigned           PI      = 31,
  parameter int unsigned           SIG_W   = SIG_W_DEF,
  parameter logic [SIG_W-1:0]      SIG_POLY = SIG_POLY_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [31:0]      num_patterns,
  output logic [M-1:0]     cut_state,
  input  logic [M-1:0]     cut_next,
  output logic [PI-1:0]    cut_pi,
  output logic             scan_en,
  output logic             scan_in,
  output logic             tpg_swapped,
  output logic [31:0]      patterns_applied,
  output logic             busy,
  output logic             done,
  output logic [SIG_W-1:0] signature
);

  function automatic logic [M-1:0][31:0] identity_order();
    logic [M-1:0][31:0] o;
    for (int p = 0; p < M; p++) o[p] = 32'(p);
    return o;
  endfunction

  logic         tpg_en, tpg_load, chain_en, sig_en, sig_clear, capture;
  logic         scan_out;
  logic [N-1:0] pattern, lfsr_state;

  bist_controller #(.M(M)) u_ctrl (
    .clk, .rst_n, .start, .num_patterns,
    .tpg_en, .tpg_load, .scan_en, .chain_en, .sig_en, .sig_clear,
    .capture, .busy, .done, .patterns_applied
  );

  bs_lfsr #(
    .N(N), .POLY(POLY), .KIND(KIND), .SEED(SEED),
    .SWAP_A(SWAP_A), .SWAP_B(SWAP_B), .SEL(SEL), .OUT_O2(OUT_O2), .SWAP_ON(SWAP_ON)
  ) u_tpg (
    .clk, .rst_n, .en(tpg_en), .load(tpg_load),
    .scan_bit(scan_in), .swapped(tpg_swapped), .pattern, .lfsr_state
  );

  scan_chain #(.M(M), .ORDER(ORDER), .INV(INV)) u_chain (
    .clk, .rst_n, .scan_en, .clk_en(chain_en),
    .scan_in, .scan_out, .ff_q(cut_state), .ff_d(cut_next)
  );

  sig_analyzer #(.W(SIG_W), .POLY(SIG_POLY)) u_sig (
    .clk, .rst_n, .clear(sig_clear), .en(sig_en), .din(scan_out), .signature
  );

  assign cut_pi = pattern[PI-1:0];

  initial begin
    assert (PI >= 1 && PI <= N) else $error("bist_top: PI must lie in 1..N");
  end

endmodule
