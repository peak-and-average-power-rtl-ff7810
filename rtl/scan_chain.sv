// scan_chain: full-scan chain of M scan cells with a chosen cell order and
// optional inverters on the scan links.
//
// Chain position p (0 = next to scan_in, M-1 = scan_out) holds the CUT
// flip-flop ORDER[p]. In shift mode (scan_en = 1) position p loads position
// p-1, or scan_in for p = 0, inverted when INV[p] is set; in capture mode it
// loads the CUT next state ff_d[ORDER[p]] unchanged. ff_q presents the cells
// to the CUT indexed by flip-flop, not by chain position. Order and inverters
// are what the low-power chain-ordering step chooses per circuit: cells that
// tend to hold equal values are chained directly, cells that tend to differ
// through an inverter, so that fewer cells toggle in the capture cycle. The
// defaults (identity order, no inverters) are placeholders for a circuit's
// own ordering; placing the inverter only on the scan path is this design's
// reading.
//
// Timing: all cells update on the rising clock edge when clk_en is set;
// rst_n clears them asynchronously.
module scan_chain #(
  parameter int unsigned           M     = 669,
  parameter logic [M-1:0][31:0]    ORDER = identity_order(),
  parameter logic [M-1:0]          INV   = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         scan_en,
  input  logic         clk_en,
  input  logic         scan_in,
  output logic         scan_out,
  output logic [M-1:0] ff_q,
  input  logic [M-1:0] ff_d
);

  function automatic logic [M-1:0][31:0] identity_order();
    logic [M-1:0][31:0] o;
    for (int p = 0; p < M; p++) o[p] = 32'(p);
    return o;
  endfunction

  function automatic bit is_permutation(logic [M-1:0][31:0] ord);
    bit [M-1:0] seen = '0;
    for (int p = 0; p < M; p++) begin
      if (ord[p] >= M || seen[ord[p]]) return 1'b0;
      seen[ord[p]] = 1'b1;
    end
    return 1'b1;
  endfunction

  logic [M-1:0] chain;     // cell values by chain position
  logic [M-1:0] shift_in;  // what each position loads in shift mode
  logic [M-1:0] capt_in;   // what each position loads in capture mode

  always_comb begin
    shift_in = {chain[M-2:0], scan_in} ^ INV;
    for (int p = 0; p < M; p++) capt_in[p] = ff_d[ORDER[p]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      chain <= '0;
    else if (clk_en) chain <= scan_en ? shift_in : capt_in;
  end

  always_comb begin
    for (int p = 0; p < M; p++) ff_q[ORDER[p]] = chain[p];
  end

  assign scan_out = chain[M-1];

  initial begin
    assert (M >= 2) else $error("scan_chain: M must be at least 2");
    assert (is_permutation(ORDER)) else $error("scan_chain: ORDER is not a permutation of 0..M-1");
  end

endmodule
