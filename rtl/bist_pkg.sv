// bist_pkg: types and constants shared by the low-power scan BIST.
//
// The LFSR feedback style (external = Fibonacci, internal = Galois) is an
// enum. Polynomials are written as a bit vector whose bit k-1 holds the
// coefficient of x^k (k = 1..n); the x^0 term is implied. The default
// polynomials are x^60 + x + 1 for the pattern generator (the trinomial of the
// bit-swapping arrangement, at the 60-stage size used for the largest circuit
// that this trinomial fits) and x^32 + x^22 + x^2 + x + 1 for the signature
// register, which is this design's own choice.
package bist_pkg;

  typedef enum logic {
    LFSR_EXTERNAL = 1'b0,  // one XOR tree feeding cell c1, cells shift c1 -> cn
    LFSR_INTERNAL = 1'b1   // cn fed back into c1 and XORed between stages
  } lfsr_kind_e;

  // Default pattern-generator size and polynomial x^60 + x + 1.
  localparam int unsigned TPG_N = 60;
  localparam logic [TPG_N-1:0] TPG_POLY = {1'b1, {(TPG_N-2){1'b0}}, 1'b1};

  // Default signature register: x^32 + x^22 + x^2 + x + 1.
  localparam int unsigned SIG_W_DEF = 32;
  localparam logic [SIG_W_DEF-1:0] SIG_POLY_DEF =
      (32'd1 << 31) | (32'd1 << 21) | (32'd1 << 1) | 32'd1;

  // Controller states of a test-per-scan session.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,
    ST_SHIFT   = 3'd1,  // load pattern k (and unload response k-1)
    ST_CAPTURE = 3'd2,  // test cycle: scan cells take the CUT next state
    ST_UNLOAD  = 3'd3,  // shift out the last response
    ST_DONE    = 3'd4
  } bist_state_e;

endpackage
