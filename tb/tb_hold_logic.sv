// tb_hold_logic: self-checking testbench of the scan-loadable hold point.
//
// Loads random {armed, hold_at} words through the scan chain and checks the
// previous word on scan_out bit by bit, then checks auto_hold against the
// rule "in a run and (scanning, or armed and count equals hold_at)" for
// every pattern count, with and without a run in progress.
module tb_hold_logic;
  localparam int CW = 8;
  logic clk = 0, rst_n = 0, scan_en = 0, scan_in = 0, in_run = 0;
  logic scan_out, auto_hold;
  logic [CW-1:0] pattern_count = '0;
  int checks = 0, failures = 0;

  hold_logic #(.CW(CW)) dut (.clk, .rst_n, .scan_en, .scan_in, .scan_out, .in_run,
                             .pattern_count, .auto_hold);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [CW:0] prev, word;

  task automatic scan_load(input logic [CW:0] w, input logic [CW:0] expect_out);
    scan_en = 1;
    for (int i = 0; i <= CW; i++) begin
      scan_in = w[i];
      #1;
      check(scan_out === expect_out[i], $sformatf("scan_out bit %0d", i));
      if (in_run) check(auto_hold, "run frozen while scanning");
      @(negedge clk);
    end
    scan_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev = '0;
    for (int k = 0; k < 20; k++) begin
      word = (CW + 1)'($urandom);
      if (k == 0) word[CW] = 1'b1;
      in_run = 1'(k % 2);
      scan_load(word, prev);
      prev = word;
      for (int r = 0; r < 2; r++) begin
        in_run = 1'(r);
        for (int c = 0; c < (1 << CW); c++) begin
          pattern_count = CW'(c);
          #1;
          check(auto_hold === (in_run && word[CW] && (c == int'(word[CW-1:0]))),
                $sformatf("auto_hold word %0h count %0d run %0b", word, c, in_run));
        end
      end
    end
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
