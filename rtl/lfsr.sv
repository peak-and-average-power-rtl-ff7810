// lfsr: maximal-length linear feedback shift register, N cells c1..cN.
//
// state[k-1] is cell c(k). With KIND = LFSR_EXTERNAL all feedback is one XOR
// that feeds c1 and the cells shift c1 -> c2 -> ... -> cN; for x^n + x + 1
// this gives c1' = c1 ^ cn and c2' = c1, the update the bit-swapping
// arrangement is built on. POLY bit k-1 set means x^k is in the polynomial, and
// c(k) is then a feedback tap. With KIND = LFSR_INTERNAL the register is of
// Galois form: c1' = cN and c(k+1)' = c(k) ^ (POLY[k-1] & cN).
// The internal equations, the seed and the reset are this design's choices.
//
// Interface: rst_n (asynchronous, active low) and load (synchronous) set the
// register to SEED, which must not be zero; en advances one step per clock.
// state is registered, so it changes on the clock edge after en.
module lfsr
  import bist_pkg::*;
#(
  parameter int unsigned      N    = TPG_N,
  parameter logic [N-1:0]     POLY = TPG_POLY,
  parameter lfsr_kind_e       KIND = LFSR_EXTERNAL,
  parameter logic [N-1:0]     SEED = N'(1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  output logic [N-1:0] state
);

  logic [N-1:0] nxt;

  always_comb begin
    if (KIND == LFSR_EXTERNAL) begin
      nxt = {state[N-2:0], ^(state & POLY)};
    end else begin
      nxt[0] = state[N-1];
      for (int k = 1; k < N; k++) nxt[k] = state[k-1] ^ (POLY[k-1] & state[N-1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= nxt;
  end

  initial begin
    assert (N >= 3) else $error("lfsr: N must be at least 3");
    assert (POLY[N-1]) else $error("lfsr: POLY must contain x^N");
    assert (SEED != '0) else $error("lfsr: all-zero seed locks the register");
  end

endmodule
