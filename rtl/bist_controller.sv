// bist_controller: sequencer of a test-per-scan BIST session.
//
// Each pattern takes M shift cycles, in which the pattern generator advances
// and the scan chain shifts one bit, followed by one capture (test) cycle in
// which the chain loads the CUT response and the generator holds. Shifting in
// pattern k also shifts out response k-1, which the signature analyzer
// absorbs; the first load carries no response and is not compacted. After the
// last capture an unload phase of M more shifts empties the chain into the
// signature. The method itself only fixes the shift/capture structure of
// test-per-scan BIST; the handshake and counters here are this design's own.
//
// Interface and timing: start (one cycle, from idle or done) samples
// num_patterns (TL), reseeds the generator and clears the signature. A
// session of TL patterns takes TL*(M+1) + M cycles after the start cycle; done
// then rises and stays high until the next start. num_patterns = 0 goes
// straight to done. All outputs are decoded from registered state.
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned M = 669
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] num_patterns,
  output logic        tpg_en,
  output logic        tpg_load,
  output logic        scan_en,
  output logic        chain_en,
  output logic        sig_en,
  output logic        sig_clear,
  output logic        capture,
  output logic        busy,
  output logic        done,
  output logic [31:0] patterns_applied
);

  localparam int unsigned CW = $clog2(M + 1);

  bist_state_e   state;
  logic [CW-1:0] shift_cnt;     // shifts done in the current phase
  logic [31:0]   target;        // TL of the current run
  logic          first_load;    // no response in the chain yet

  logic idle_like;
  assign idle_like = (state == ST_IDLE) || (state == ST_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= ST_IDLE;
      shift_cnt        <= '0;
      target           <= '0;
      first_load       <= 1'b1;
      patterns_applied <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            target           <= num_patterns;
            patterns_applied <= '0;
            shift_cnt        <= '0;
            first_load       <= 1'b1;
            state            <= (num_patterns == '0) ? ST_DONE : ST_SHIFT;
          end
        end
        ST_SHIFT: begin
          if (shift_cnt == CW'(M - 1)) begin
            shift_cnt <= '0;
            state     <= ST_CAPTURE;
          end else begin
            shift_cnt <= shift_cnt + 1'b1;
          end
        end
        ST_CAPTURE: begin
          first_load       <= 1'b0;
          patterns_applied <= patterns_applied + 1;
          state            <= (patterns_applied + 1 == target) ? ST_UNLOAD : ST_SHIFT;
        end
        ST_UNLOAD: begin
          if (shift_cnt == CW'(M - 1)) begin
            shift_cnt <= '0;
            state     <= ST_DONE;
          end else begin
            shift_cnt <= shift_cnt + 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    tpg_en    = (state == ST_SHIFT) || (state == ST_UNLOAD);
    scan_en   = (state != ST_CAPTURE);
    chain_en  = (state == ST_SHIFT) || (state == ST_UNLOAD) || (state == ST_CAPTURE);
    sig_en    = ((state == ST_SHIFT) && !first_load) || (state == ST_UNLOAD);
    capture   = (state == ST_CAPTURE);
    tpg_load  = idle_like && start;
    sig_clear = idle_like && start;
    busy      = !idle_like;
    done      = (state == ST_DONE);
  end

  // A capture only ever follows a complete load of M shifts.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == ST_SHIFT && shift_cnt == CW'(M - 1)) |=> (state == ST_CAPTURE));
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == ST_CAPTURE) |-> $past(state == ST_SHIFT));

endmodule
