// tb_input_mux: self-checking testbench of the normal/test input multiplexer.
//
// Applies random pattern and external words in both modes and checks that
// the CUT input follows the pattern in test mode and the external word in
// normal mode.
module tb_input_mux;
  localparam int W = 8;
  logic test_mode;
  logic [W-1:0] pattern, ext_in, y;
  int checks = 0, failures = 0;

  input_mux #(.WIDTH(W)) dut (.test_mode, .pattern, .ext_in, .y);

  initial begin
    for (int i = 0; i < 200; i++) begin
      test_mode = 1'(i % 2);
      pattern   = W'($urandom);
      ext_in    = W'($urandom);
      #1;
      checks++;
      if (y !== (test_mode ? pattern : ext_in)) begin
        failures++;
        $display("FAIL: mode %0d y %0h pattern %0h ext %0h", test_mode, y, pattern, ext_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
