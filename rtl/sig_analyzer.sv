// sig_analyzer: serial-input signature register that compacts the response
// shifted out of the scan chain.
//
// A W-bit internal-feedback (Galois) LFSR with polynomial POLY (bit k-1 =
// coefficient of x^k) divides the serial response stream; the input bit is
// XORed into the first stage. Each enabled clock: s0' = s(W-1) ^ din,
// s(k)' = s(k-1) ^ (POLY[k-1] & s(W-1)). Width, polynomial and structure are
// this design's choices; the pattern-generation method only requires that
// the response be compacted into a signature.
//
// Interface: en absorbs din on the rising edge; clear (synchronous) and rst_n
// (asynchronous) zero the register. signature is registered.
module sig_analyzer
  import bist_pkg::*;
#(
  parameter int unsigned  W    = SIG_W_DEF,
  parameter logic [W-1:0] POLY = SIG_POLY_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic         din,
  output logic [W-1:0] signature
);

  logic [W-1:0] nxt;

  always_comb begin
    nxt[0] = signature[W-1] ^ din;
    for (int k = 1; k < W; k++) nxt[k] = signature[k-1] ^ (POLY[k-1] & signature[W-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     signature <= '0;
    else if (clear) signature <= '0;
    else if (en)    signature <= nxt;
  end

endmodule
