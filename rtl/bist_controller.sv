// bist_controller: finite state machine of the restartable logic BIST.
//
// Six states, as in the document: START, RESETTPG, RESETMISR, TEST, HOLD and
// BISTDONE.  Test Mode (`tm`) high in START begins a session: the LFSR is
// loaded with its seed (RESETTPG), both MISRs are cleared (RESETMISR) and the
// patterns are applied (TEST) with ENABLE high.  Raising `hold` during TEST
// drops ENABLE in the same cycle and moves to HOLD: the pattern generator,
// the signatures and the pattern counter keep their values (nothing is
// reset), the CUTs are switched back to their external inputs and the
// intermediate signature can be read.  Dropping `hold` resumes TEST from the
// next pattern.  After NUM_PATTERNS patterns have been captured the machine
// enters BISTDONE, where the signatures are compared; it stays there while
// `tm` is high (the final signatures can be read) and returns to START when
// `tm` falls, resetting the LFSR, the MISRs and the pattern counter on the
// way, then waits for the next Test Mode request.  `tm` falling in any other state abandons the session.
// The document gives the states and the roles of TM, HOLD and ENABLE; the
// session length, the abort rule and the wait for `tm` to fall are this
// design's choices.
//
// Timing: counting the clock edge that samples `tm` high in START as edge 1,
// the LFSR seed is loaded at edge 2, the MISRs are cleared at edge 3, the
// first pattern is captured at edge 4 and, without HOLD, the last one at
// edge NUM_PATTERNS + 3, which also enters BISTDONE.  Each HOLD adds one
// edge per cycle with `hold` high and one edge to return from HOLD to TEST.
//
// Outputs: `enable` (LFSR advance and MISR capture), `tpg_clear`, `misr_clear`,
// `test_mode` (CUT input select), `evaluate` (compare signatures), `state`
// and `pattern_count` (patterns captured in the current test run).
module bist_controller
  import bist_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 255,
  localparam int unsigned CW = $clog2(NUM_PATTERNS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tm,
  input  logic          hold,
  output logic          enable,
  output logic          tpg_clear,
  output logic          misr_clear,
  output logic          test_mode,
  output logic          evaluate,
  output bist_state_e   state,
  output logic [CW-1:0] pattern_count
);

  bist_state_e state_next;
  logic        last;

  assign last = (pattern_count == CW'(NUM_PATTERNS - 1));

  always_comb begin
    enable     = (state == ST_TEST) && tm && !hold;
    // The registers are also reset when a finished run returns to START.
    tpg_clear  = (state == ST_RESETTPG)  || ((state == ST_BISTDONE) && !tm);
    misr_clear = (state == ST_RESETMISR) || ((state == ST_BISTDONE) && !tm);
    test_mode  = (state == ST_RESETTPG) || (state == ST_RESETMISR) ||
                 ((state == ST_TEST) && !hold);
    evaluate   = (state == ST_BISTDONE);

    state_next = state;
    unique case (state)
      ST_START:     if (tm) state_next = ST_RESETTPG;
      ST_RESETTPG:  state_next = tm ? ST_RESETMISR : ST_START;
      ST_RESETMISR: state_next = tm ? ST_TEST : ST_START;
      ST_TEST: begin
        if (!tm)       state_next = ST_START;
        else if (hold) state_next = ST_HOLD;
        else if (last) state_next = ST_BISTDONE;
      end
      ST_HOLD: begin
        if (!tm)        state_next = ST_START;
        else if (!hold) state_next = ST_TEST;
      end
      ST_BISTDONE:  if (!tm) state_next = ST_START;
      default:      state_next = ST_START;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= ST_START;
      pattern_count <= '0;
    end else begin
      state <= state_next;
      if (tpg_clear)            pattern_count <= '0;
      else if (enable)          pattern_count <= pattern_count + 1'b1;
    end
  end

  // Signature generation runs only in TEST, and never while HOLD is high.
  assert property (@(posedge clk) disable iff (!rst_n) enable |-> (state == ST_TEST) && !hold)
    else $error("bist_controller: ENABLE outside TEST or during HOLD");
  // Never more than NUM_PATTERNS patterns in one session.
  assert property (@(posedge clk) disable iff (!rst_n) pattern_count <= CW'(NUM_PATTERNS))
    else $error("bist_controller: pattern counter overrun");

endmodule
