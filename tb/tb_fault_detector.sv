// tb_fault_detector: self-checking testbench of the signature comparator.
//
// Checks that results are low after reset, that evaluating equal signatures
// gives PASS and different ones FAIL (with DONE in both cases), that the
// result is held after `evaluate` falls while the signatures keep changing,
// and that `clear` drops it.
module tb_fault_detector;
  localparam int W = 8;
  logic clk = 0, rst_n = 0, clear = 0, evaluate = 0;
  logic [W-1:0] signature = '0, ref_signature = '0;
  logic pass, fail, done;
  int checks = 0, failures = 0;

  fault_detector #(.WIDTH(W)) dut (.clk, .rst_n, .clear, .evaluate, .signature,
                                   .ref_signature, .pass, .fail, .done);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check({pass, fail, done} === 3'b000, "reset state");
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      bit same;
      same = (i % 3 != 0);
      ref_signature = W'($urandom);
      signature = same ? ref_signature : ref_signature ^ W'(1 << (i % W));
      @(negedge clk);
      check(done === 1'b0, "no done before evaluate");
      evaluate = 1;
      @(negedge clk);
      evaluate = 0;
      check({pass, fail, done} === {same, !same, 1'b1},
            $sformatf("iteration %0d: pass %0b fail %0b done %0b", i, pass, fail, done));
      signature = ~signature;
      @(negedge clk);
      check({pass, fail, done} === {same, !same, 1'b1}, "result held");
      clear = 1;
      @(negedge clk);
      clear = 0;
      check({pass, fail, done} === 3'b000, "clear drops result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
