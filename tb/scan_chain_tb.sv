// scan_chain_tb: self-checking test of scan_chain with a non-trivial order
// and inverters. A reference chain kept here (by chain position) is updated
// with random shift, capture and hold cycles; scan_out and ff_q (by CUT
// flip-flop, through ORDER) are compared every cycle.
module scan_chain_tb;
  localparam int M = 8;
  localparam logic [M-1:0][31:0] ORDER = {32'd4, 32'd2, 32'd6, 32'd1, 32'd5, 32'd7, 32'd0, 32'd3};
  localparam logic [M-1:0] INV = 8'b1010_0101;

  logic clk = 1'b0, rst_n = 1'b0, scan_en = 1'b1, clk_en = 1'b0, scan_in = 1'b0;
  logic scan_out;
  logic [M-1:0] ff_q, ff_d;
  int checks = 0, failures = 0;

  scan_chain #(.M(M), .ORDER(ORDER), .INV(INV)) dut (.clk, .rst_n, .scan_en, .clk_en, .scan_in, .scan_out, .ff_q, .ff_d);

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
    logic [M-1:0] ref_chain, ref_q;
    int n_shift = 0, n_capt = 0;
    ff_d = '0;
    ref_chain = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      scan_in = 1'($urandom);
      ff_d    = M'($urandom);
      clk_en  = ($urandom % 8) != 0;
      scan_en = ($urandom % 4) != 0;
      @(posedge clk); #1;
      if (clk_en) begin
        if (scan_en) begin
          for (int p = M - 1; p > 0; p--) ref_chain[p] = ref_chain[p-1] ^ INV[p];
          ref_chain[0] = scan_in ^ INV[0];
          n_shift++;
        end else begin
          for (int p = 0; p < M; p++) ref_chain[p] = ff_d[ORDER[p]];
          n_capt++;
        end
      end
      for (int p = 0; p < M; p++) ref_q[ORDER[p]] = ref_chain[p];
      check(scan_out == ref_chain[M-1], $sformatf("scan_out at %0d", t));
      check(ff_q == ref_q, $sformatf("ff_q at %0d: %b vs %b", t, ff_q, ref_q));
    end
    check(n_shift > 100 && n_capt > 50, "both modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
