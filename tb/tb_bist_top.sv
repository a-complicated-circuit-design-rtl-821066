// tb_bist_top: end-to-end self-checking testbench of the whole BIST, at the
// design's default parameters (255 patterns per run).
//
// Runs:
//   * fault-free replica selected: PASS, and both signatures equal the
//     reference model's;
//   * every one of the 16 fault sites of the stuck-at replica, at 0 and at 1,
//     and of the bit-flip replica: FAIL exactly when the model's faulty
//     signature differs from the fault-free one;
//   * a run suspended by HOLD twice: while held, the intermediate signature
//     equals the model's after that many patterns and the selected CUT works
//     on the external inputs (normal mode); the run then resumes and ends
//     with the same signature as an uninterrupted run;
//   * a run stopped by a scan-loaded hold point at pattern 100, advanced to
//     a second point at 200, then released to the end, with the
//     intermediate signatures checked and the run frozen during scanning;
//   * a run abandoned by dropping TM;
//   * select code 3 (fault-free replica) while the other replicas are faulty.
// The edge count from TM to DONE is checked against NUM_PATTERNS + 4, plus,
// for each HOLD, one edge per cycle with HOLD high and one to leave HOLD.  Each mechanism (pass, stuck-at detection, bit-flip
// detection, hold, resume, normal-mode operation, abandon, scan-loaded
// hold point, advance to a later point) is counted and a
// mechanism that never happened is a failure.
module tb_bist_top;
  import bist_pkg::*;
  import bist_ref_pkg::*;
  localparam int N = 255;

  logic clk = 0, rst_n = 0, tm = 0, hold = 0;
  logic [1:0] cut_sel = 0;
  logic [7:0] ext_in = 0;
  logic sa_en = 0, sa_value = 0, flip_en = 0;
  logic [3:0] sa_site = 0, flip_site = 0;
  logic scan_en = 0, scan_in = 0, scan_out, auto_hold;
  logic [4:0] cut_out;
  logic [7:0] pattern;
  logic [15:0] signature, ref_signature;
  logic [7:0] pattern_count;
  bist_state_e state;
  logic test_mode, pass, fail, done;
  int checks = 0, failures = 0;
  int n_pass = 0, n_sa_detect = 0, n_flip_detect = 0, n_hold = 0, n_resume = 0,
      n_normal = 0, n_abandon = 0, n_scan_stop = 0, n_scan_advance = 0;

  bist_top dut (.clk, .rst_n, .tm, .hold, .cut_sel, .ext_in, .sa_en, .sa_value, .sa_site,
                .flip_en, .flip_site, .scan_en, .scan_in, .scan_out, .auto_hold, .cut_out, .pattern, .signature, .ref_signature,
                .pattern_count, .state, .test_mode, .pass, .fail, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [15:0] good_sig;

  // One uninterrupted run; returns after DONE, with TM dropped again.
  task automatic run(input string name, input fault_mode_e m, input int site,
                     input bit expect_checked);
    int edges;
    logic [15:0] exp_sig;
    bit exp_fail;
    exp_sig  = signature_after(N, m, site);
    exp_fail = (exp_sig != good_sig);
    tm = 1;
    edges = 0;
    do begin @(negedge clk); edges++; end while (!(done && state == ST_BISTDONE) && edges < 2000);
    check(edges == N + 4, $sformatf("%s: DONE after %0d edges, expected %0d", name, edges, N + 4));
    check(ref_signature == good_sig, $sformatf("%s: reference signature %0h, model %0h",
                                               name, ref_signature, good_sig));
    check(signature == exp_sig, $sformatf("%s: signature %0h, model %0h", name, signature, exp_sig));
    check({pass, fail} == {!exp_fail, exp_fail}, $sformatf("%s: pass %0b fail %0b", name, pass, fail));
    if (expect_checked) check(exp_fail, $sformatf("%s: fault expected to be detected", name));
    if (pass) n_pass++;
    if (fail && cut_sel == 1) n_sa_detect++;
    if (fail && cut_sel == 2) n_flip_detect++;
    tm = 0;
    @(negedge clk);
    check(state == ST_START && done && {pass, fail} == {!exp_fail, exp_fail},
          "idle after run, result still held");
    check(signature == 0 && ref_signature == 0 && pattern == 8'd1 && pattern_count == 0,
          "registers reset after the run");
  endtask

  // Shift {armed, hold_at} into the hold-point chain, LSB of hold_at first.
  task automatic scan_load(input bit armed, input int at);
    logic [8:0] w;
    w = {armed, 8'(at)};
    scan_en = 1;
    for (int i = 0; i < 9; i++) begin
      scan_in = w[i];
      @(negedge clk);
      if (tm) check(state == ST_HOLD || state == ST_RESETTPG || state == ST_RESETMISR,
                    "run frozen while the hold point is scanned");
    end
    scan_en = 0;
  endtask

  // Run until the scan-loaded hold point stops the run; check where it stopped.
  task automatic expect_stop_at(input int at, input fault_mode_e m, input int site);
    int guard;
    guard = 0;
    #1;  // let auto_hold settle after scan_en falls
    while (!(state == ST_HOLD && auto_hold) && guard < 1000) begin
      @(negedge clk); guard++;
    end
    check(state == ST_HOLD && pattern_count == 8'(at),
          $sformatf("hold point %0d: stopped at %0d", at, pattern_count));
    check(signature == signature_after(at, m, site),
          $sformatf("hold point %0d: intermediate signature", at));
    repeat (3) @(negedge clk);
    check(state == ST_HOLD && pattern_count == 8'(at), "stays at the hold point");
  endtask

  initial begin
    good_sig = signature_after(N, FAULT_NONE, 0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // normal mode at idle: the selected CUT adds the external operands
    for (int i = 0; i < 20; i++) begin
      ext_in = 8'($urandom);
      #1;
      check(!test_mode && cut_out == 5'(ext_in[3:0] + ext_in[7:4]), "normal-mode function at idle");
      n_normal++;
      @(negedge clk);
    end

    cut_sel = 0;
    run("fault-free", FAULT_NONE, 0, 0);

    // stuck-at replica, every site, both values
    sa_en = 1; cut_sel = 1;
    for (int v = 0; v < 2; v++)
      for (int s = 0; s < 16; s++) begin
        sa_value = 1'(v); sa_site = 4'(s);
        run($sformatf("stuck-at-%0d site %0d", v, s), v ? FAULT_SA1 : FAULT_SA0, s, 0);
      end

    // bit-flip replica, every site
    flip_en = 1; cut_sel = 2;
    for (int s = 0; s < 16; s++) begin
      flip_site = 4'(s);
      run($sformatf("bit-flip site %0d", s), FAULT_FLIP, s, 1);
    end

    // select code 3 falls back to the fault-free replica
    cut_sel = 3;
    run("select 3", FAULT_NONE, 0, 0);

    // a run suspended twice by HOLD, on the stuck-at replica (a0 stuck at 1)
    cut_sel = 1; sa_value = 1; sa_site = 0;
    begin
      int edges;
      logic [15:0] s_before;
      tm = 1;
      edges = 0;
      do begin
        if ((edges == 60 || edges == 180) && !hold) begin
          hold = 1;
          #1;
          n_hold++;
          check(!test_mode, "HOLD returns the CUT to normal mode at once");
          @(negedge clk); edges++;
          check(state == ST_HOLD, "state HOLD");
          s_before = signature;
          check(signature == signature_after(int'(pattern_count), FAULT_SA1, 0),
                $sformatf("intermediate signature after %0d patterns", pattern_count));
          check(pattern == pattern_after(int'(pattern_count)), "LFSR holds its place");
          for (int i = 0; i < 5; i++) begin
            ext_in = 8'($urandom);
            #1;
            check(cut_out == adder(ext_in, FAULT_SA1, 0), "normal-mode function during HOLD");
            n_normal++;
            @(negedge clk); edges++;
            check(signature == s_before, "signature frozen during HOLD");
          end
          hold = 0;
          n_resume++;
        end
        @(negedge clk); edges++;
      end while (!(done && state == ST_BISTDONE) && edges < 2000);
      check(edges == N + 4 + 2 * 7, $sformatf("held run: DONE after %0d edges", edges));
      check(signature == signature_after(N, FAULT_SA1, 0), "held run ends with the same signature");
      check(fail && !pass, "held run detects the fault");
      tm = 0;
      @(negedge clk);
    end

    // scan-loaded hold points: stop at pattern 100, advance to 200, then finish
    cut_sel = 2; flip_site = 12;
    scan_load(1, 100);
    tm = 1;
    expect_stop_at(100, FAULT_FLIP, 12);
    n_scan_stop++;
    scan_load(1, 200);
    expect_stop_at(200, FAULT_FLIP, 12);
    n_scan_advance++;
    scan_load(0, 0);
    begin
      int guard;
      guard = 0;
      while (!(done && state == ST_BISTDONE) && guard < 1000) begin @(negedge clk); guard++; end
    end
    check(signature == signature_after(N, FAULT_FLIP, 12) && fail,
          "run through two hold points ends with the uninterrupted signature");
    tm = 0;
    @(negedge clk);

    // a run abandoned part way
    cut_sel = 0;
    tm = 1;
    repeat (50) @(negedge clk);
    check(state == ST_TEST && !done, "abandon: under way, previous result cleared");
    tm = 0;
    @(negedge clk);
    check(state == ST_START, "abandon: TM low returns to START");
    repeat (5) @(negedge clk);
    check(!done, "abandon: no result");
    n_abandon++;
    run("after abandon", FAULT_NONE, 0, 0);

    check(n_pass > 0, "mechanism PASS never happened");
    check(n_sa_detect > 0, "mechanism stuck-at detection never happened");
    check(n_flip_detect > 0, "mechanism bit-flip detection never happened");
    check(n_hold > 0, "mechanism HOLD never happened");
    check(n_resume > 0, "mechanism resume never happened");
    check(n_normal > 0, "mechanism normal mode never happened");
    check(n_abandon > 0, "mechanism abandon never happened");
    check(n_scan_stop > 0, "mechanism scan-loaded hold point never happened");
    check(n_scan_advance > 0, "mechanism advance to a later hold point never happened");
    $display("mechanisms: pass=%0d stuck_at_detected=%0d bit_flip_detected=%0d hold=%0d resume=%0d normal_mode=%0d abandon=%0d scan_stop=%0d scan_advance=%0d",
             n_pass, n_sa_detect, n_flip_detect, n_hold, n_resume, n_normal, n_abandon,
             n_scan_stop, n_scan_advance);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
