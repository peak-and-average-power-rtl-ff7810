// bs_lfsr: bit-swapping LFSR, a low-transition test pattern generator.
//
// A plain maximal-length LFSR drives swap multiplexers (bit_swap). Cell
// c(SWAP_A) is swapped with its adjacent cell c(SWAP_B) whenever cell c(SEL)
// equals SWAP_ON. The default is the x^n + x + 1 external arrangement: c1 and
// c2 swapped under cn. There the second multiplexer output o2 toggles on only
// a quarter of the clocks instead of half, so feeding it to the scan-chain
// input halves the shift transitions in the chain, while keeping as many
// ones as zeros. Other arrangements (other trinomials, internal LFSRs, other
// swapped cells) are set through the parameters; OUT_O2 picks which
// multiplexer output drives scan_bit.
//
// The parallel output pattern is the test-per-clock form: pairs (c1,c2),
// (c3,c4), ... are swapped together under cn and cn passes through. It runs
// through the same vectors as the LFSR, in another order, with a quarter fewer
// transitions on the swapped cells. For even N the cell just below cn has no
// partner and passes through as well (this design's reading for even sizes).
//
// Timing: everything is combinational from the LFSR register, so scan_bit
// and pattern change on the clock edge after en. rst_n / load reseed.
module bs_lfsr
  import bist_pkg::*;
#(
  parameter int unsigned  N       = TPG_N,
  parameter logic [N-1:0] POLY    = TPG_POLY,
  parameter lfsr_kind_e   KIND    = LFSR_EXTERNAL,
  parameter logic [N-1:0] SEED    = N'(1),
  parameter int unsigned  SWAP_A  = 1,   // cell numbers are 1-based: c1..cN
  parameter int unsigned  SWAP_B  = 2,
  parameter int unsigned  SEL     = N,
  parameter bit           OUT_O2  = 1'b1,
  parameter bit           SWAP_ON = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  output logic         scan_bit,
  output logic         swapped,
  output logic [N-1:0] pattern,
  output logic [N-1:0] lfsr_state
);

  localparam int unsigned NPAIR = (N - 1) / 2;

  logic o1, o2;

  lfsr #(.N(N), .POLY(POLY), .KIND(KIND), .SEED(SEED)) u_lfsr (
    .clk, .rst_n, .en, .load, .state(lfsr_state)
  );

  // Serial output: the single swap pair that feeds the scan chain.
  bit_swap #(.SWAP_ON(SWAP_ON)) u_swap (
    .a  (lfsr_state[SWAP_A-1]),
    .b  (lfsr_state[SWAP_B-1]),
    .sel(lfsr_state[SEL-1]),
    .o1 (o1),
    .o2 (o2)
  );

  assign scan_bit = OUT_O2 ? o2 : o1;
  assign swapped  = (lfsr_state[SEL-1] == SWAP_ON);

  // Parallel output: every pair (c(2j+1), c(2j+2)) swapped under cN.
  for (genvar j = 0; j < NPAIR; j++) begin : g_pair
    bit_swap #(.SWAP_ON(SWAP_ON)) u_pair (
      .a  (lfsr_state[2*j]),
      .b  (lfsr_state[2*j+1]),
      .sel(lfsr_state[N-1]),
      .o1 (pattern[2*j]),
      .o2 (pattern[2*j+1])
    );
  end
  for (genvar k = 2 * NPAIR; k < N; k++) begin : g_pass
    assign pattern[k] = lfsr_state[k];
  end

  initial begin
    assert (SWAP_A >= 1 && SWAP_A <= N && SWAP_B >= 1 && SWAP_B <= N && SEL >= 1 && SEL <= N)
      else $error("bs_lfsr: cell numbers must lie in 1..N");
    assert (SWAP_A != SWAP_B && SEL != SWAP_A && SEL != SWAP_B)
      else $error("bs_lfsr: swapped cells and selection cell must be three different cells");
  end

endmodule
