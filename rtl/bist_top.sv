// bist_top: restartable logic BIST for a circuit under test, with fault
// injection, to detect faults such as those caused by device aging.
//
// Data path: the LFSR pattern generator feeds the input multiplexer, which in
// test mode drives three replicas of the circuit under test (CUT) with the
// patterns and in normal mode with the external inputs `ext_in`.  Replica 0
// is fault-free; replica 1 can have any wire stuck at 0 or 1 (`sa_*`);
// replica 2 can have any wire inverted (`flip_*`).  The CUT selector passes
// the replica chosen by `cut_sel` to the test MISR, while a reference MISR
// compresses the fault-free replica's responses from the same patterns.  At
// the end of the session the fault detector compares the two signatures and
// latches PASS or FAIL with DONE; these stay high after `tm` falls, while
// the LFSR, the MISRs and the pattern counter are reset.  The BIST controller sequences all of it
// from Test Mode (`tm`) and `hold`; raising `hold` suspends the session
// without losing state, returns the CUTs to normal operation and exposes the
// intermediate signature, and dropping it resumes from the next pattern.
// The hold logic can also stop the run by itself: a hold point shifted in
// through a short scan chain (`scan_*`) suspends the run once that many
// patterns have been compressed, and loading a later point, or disarming it,
// lets the run go on.
//
// The block structure, the controller's states and the three-replica fault
// scheme follow the document; the CUT (a 4-bit adder), the widths, the
// polynomials and the session length are this design's choices.
//
// Timing: with `tm` held high and `hold` low, `done` rises
// NUM_PATTERNS + 4 clock edges after `tm` is first sampled high in START.
// Each HOLD adds one edge per cycle with `hold` high and one to leave HOLD.
//
// Signature width: the MISR is 16 bits wide although the LFSR is 8.  A
// maximal-length MISR returns to its start after 2**WIDTH-1 steps, so an
// 8-bit MISR run for all 255 patterns cancels any error that is the same in
// every cycle: a bit flip on a CUT output would then leave the signature
// unchanged.  With 16 bits the run is far shorter than the MISR period and
// such faults are caught.
module bist_top
  import bist_pkg::*;
#(
  parameter int unsigned MISR_WIDTH   = 16,
  parameter int unsigned NUM_PATTERNS = 255,
  localparam int unsigned CW = $clog2(NUM_PATTERNS + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  tm,
  input  logic                  hold,
  input  logic [1:0]            cut_sel,
  input  logic [CUT_IN_W-1:0]   ext_in,
  // stuck-at fault on replica 1
  input  logic                  sa_en,
  input  logic                  sa_value,
  input  logic [SITE_W-1:0]     sa_site,
  // bit-flip fault on replica 2
  input  logic                  flip_en,
  input  logic [SITE_W-1:0]     flip_site,
  // scan-loadable hold point {armed, hold_at}, LSB of hold_at first
  input  logic                  scan_en,
  input  logic                  scan_in,
  output logic                  scan_out,
  output logic                  auto_hold,
  output logic [CUT_OUT_W-1:0]  cut_out,
  output logic [CUT_IN_W-1:0]   pattern,
  output logic [MISR_WIDTH-1:0] signature,
  output logic [MISR_WIDTH-1:0] ref_signature,
  output logic [CW-1:0]         pattern_count,
  output bist_state_e           state,
  output logic                  test_mode,
  output logic                  pass,
  output logic                  fail,
  output logic                  done
);

  logic enable, tpg_clear, misr_clear, evaluate, hold_any;
  logic [CUT_IN_W-1:0]  cut_in;
  logic [CUT_OUT_W-1:0] cut0_out, cut1_out, cut2_out;
  fault_mode_e          sa_mode, flip_mode;

  // External HOLD or the scan-loaded hold point suspends the run.
  assign hold_any = hold || auto_hold;

  hold_logic #(.CW(CW)) u_hold (
    .clk, .rst_n, .scan_en, .scan_in, .scan_out,
    .in_run(state == ST_TEST || state == ST_HOLD), .pattern_count, .auto_hold
  );

  bist_controller #(.NUM_PATTERNS(NUM_PATTERNS)) u_ctrl (
    .clk, .rst_n, .tm, .hold(hold_any),
    .enable, .tpg_clear, .misr_clear, .test_mode, .evaluate,
    .state, .pattern_count
  );

  lfsr #(.WIDTH(CUT_IN_W)) u_tpg (
    .clk, .rst_n, .clear(tpg_clear), .enable, .q(pattern)
  );

  input_mux #(.WIDTH(CUT_IN_W)) u_in_mux (
    .test_mode, .pattern, .ext_in, .y(cut_in)
  );

  always_comb begin
    sa_mode   = !sa_en   ? FAULT_NONE : (sa_value ? FAULT_SA1 : FAULT_SA0);
    flip_mode = !flip_en ? FAULT_NONE : FAULT_FLIP;
  end

  cut_adder u_cut0 (.in_bits(cut_in), .fault_mode(FAULT_NONE), .fault_site('0),
                    .out_bits(cut0_out));
  cut_adder u_cut1 (.in_bits(cut_in), .fault_mode(sa_mode),    .fault_site(sa_site),
                    .out_bits(cut1_out));
  cut_adder u_cut2 (.in_bits(cut_in), .fault_mode(flip_mode),  .fault_site(flip_site),
                    .out_bits(cut2_out));

  cut_selector u_sel (
    .sel(cut_sel), .cut0(cut0_out), .cut1(cut1_out), .cut2(cut2_out), .y(cut_out)
  );

  misr #(.WIDTH(MISR_WIDTH), .IN_WIDTH(CUT_OUT_W)) u_misr (
    .clk, .rst_n, .clear(misr_clear), .enable, .d(cut_out), .signature
  );

  misr #(.WIDTH(MISR_WIDTH), .IN_WIDTH(CUT_OUT_W)) u_ref_misr (
    .clk, .rst_n, .clear(misr_clear), .enable, .d(cut0_out), .signature(ref_signature)
  );

  fault_detector #(.WIDTH(MISR_WIDTH)) u_detect (
    .clk, .rst_n, .clear(state == ST_RESETTPG), .evaluate, .signature, .ref_signature,
    .pass, .fail, .done
  );

endmodule
