// tb_bist_controller: self-checking testbench of the BIST controller FSM.
//
// Runs a full test without HOLD and checks the state sequence START,
// RESETTPG, RESETMISR, TEST, BISTDONE, the clear pulses, exactly
// NUM_PATTERNS enable cycles and the edge count to BISTDONE.  A second run
// raises HOLD twice in the middle: ENABLE must drop in the same cycle, the
// pattern counter must hold, test_mode must fall (external inputs), and the
// run must still capture exactly NUM_PATTERNS patterns.  BISTDONE must wait
// for TM to fall, and TM falling during TEST must abandon the run.
module tb_bist_controller;
  import bist_pkg::*;
  localparam int N = 255;
  logic clk = 0, rst_n = 0, tm = 0, hold = 0;
  logic enable, tpg_clear, misr_clear, test_mode, evaluate;
  bist_state_e state;
  logic [7:0] pattern_count;
  int checks = 0, failures = 0;

  bist_controller #(.NUM_PATTERNS(N)) dut (.clk, .rst_n, .tm, .hold, .enable, .tpg_clear,
    .misr_clear, .test_mode, .evaluate, .state, .pattern_count);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %0d)", what, state); end
  endtask

  int enables, edges, held_cycles;
  logic [7:0] cnt_at_hold;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == ST_START && !enable && !test_mode, "idle after reset");
    // ---- run 1: no hold
    tm = 1;
    @(negedge clk); check(state == ST_RESETTPG && tpg_clear && !enable, "RESETTPG");
    @(negedge clk); check(state == ST_RESETMISR && misr_clear && !enable, "RESETMISR");
    @(negedge clk); check(state == ST_TEST && test_mode, "TEST");
    edges = 3; enables = 0;
    while (state == ST_TEST && edges < 1000) begin
      if (enable) enables++;
      @(negedge clk); edges++;
    end
    check(state == ST_BISTDONE && evaluate, "BISTDONE reached");
    check(enables == N, $sformatf("enable cycles %0d, expected %0d", enables, N));
    check(edges == N + 3, $sformatf("BISTDONE after %0d edges, expected %0d", edges, N + 3));
    check(pattern_count == 8'(N), "pattern count at end");
    repeat (3) @(negedge clk);
    check(state == ST_BISTDONE && !enable, "BISTDONE waits for TM low");
    tm = 0;
    #1 check(tpg_clear && misr_clear, "registers reset when leaving BISTDONE");
    @(negedge clk); check(state == ST_START && pattern_count == 0, "back to START, counter reset");
    // ---- run 2: hold twice
    tm = 1;
    repeat (3) @(negedge clk);
    check(state == ST_TEST, "TEST again");
    check(pattern_count == 0, "counter cleared for new run");
    enables = 0; held_cycles = 0;
    for (int cyc = 0; state != ST_BISTDONE && cyc < 2000; cyc++) begin
      hold = (cyc >= 40 && cyc < 47) || (cyc >= 200 && cyc < 202);
      #1;
      if (hold) begin
        check(!enable && !test_mode, "HOLD drops ENABLE and test_mode at once");
        if (state == ST_HOLD) begin
          held_cycles++;
          check(pattern_count == cnt_at_hold, "counter held during HOLD");
        end
        cnt_at_hold = pattern_count;
      end else begin
        cnt_at_hold = pattern_count;
      end
      if (enable) enables++;
      @(negedge clk);
    end
    hold = 0;
    check(held_cycles == 6 + 1, $sformatf("cycles spent in HOLD %0d", held_cycles));
    check(state == ST_BISTDONE && enables == N, $sformatf("run with HOLD: %0d patterns", enables));
    tm = 0;
    @(negedge clk);
    // ---- run 3: abandon
    tm = 1;
    repeat (10) @(negedge clk);
    check(state == ST_TEST && pattern_count == 7, "run 3 under way");
    tm = 0;
    @(negedge clk);
    check(state == ST_START && !enable, "TM low abandons the run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
