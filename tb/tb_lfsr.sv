// tb_lfsr: self-checking testbench of the LFSR pattern generator.
//
// Checks, for the default 8-bit width: reset and `clear` load the seed; the
// sequence never reaches zero and visits all 255 non-zero values exactly
// once before returning to the seed (maximal length); each step matches an
// independent Fibonacci-free reference written from the polynomial
// x^8+x^6+x^5+x^4+1; `enable` low holds the value.
module tb_lfsr;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, clear = 0, enable = 0;
  logic [W-1:0] q;
  int checks = 0, failures = 0;

  lfsr #(.WIDTH(W)) dut (.clk, .rst_n, .clear, .enable, .q);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference step: right shift, feedback taps at x^8, x^6, x^5, x^4.
  function automatic logic [W-1:0] ref_step(input logic [W-1:0] v);
    logic [W-1:0] n;
    n = {1'b0, v[W-1:1]};
    if (v[0]) begin n[7] ^= 1'b1; n[5] ^= 1'b1; n[4] ^= 1'b1; n[3] ^= 1'b1; end
    return n;
  endfunction

  bit seen [256];
  logic [W-1:0] expect_q;

  initial begin
    repeat (2) @(negedge clk);
    check(q === 8'd1, "reset loads seed");
    rst_n = 1;
    enable = 1;
    expect_q = 8'd1;
    for (int i = 0; i < 255; i++) begin
      check(!seen[q], $sformatf("value %0h repeated at step %0d", q, i));
      seen[q] = 1;
      check(q != 0, "zero state reached");
      check(q === expect_q, $sformatf("step %0d: got %0h expected %0h", i, q, expect_q));
      expect_q = ref_step(expect_q);
      @(negedge clk);
    end
    check(q === 8'd1, "period is 255");
    @(negedge clk);
    enable = 0;
    expect_q = q;
    repeat (3) @(negedge clk);
    check(q === expect_q, "enable low holds");
    clear = 1; enable = 1;
    @(negedge clk);
    clear = 0;
    check(q === 8'd1, "clear reloads seed and wins over enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
