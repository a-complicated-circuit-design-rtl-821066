// tb_cut_selector: self-checking testbench of the three-way CUT selector.
//
// For random replica outputs and every select code, checks that the chosen
// replica appears at the output (code 3 selects the fault-free replica 0).
module tb_cut_selector;
  logic [1:0] sel;
  logic [4:0] cut0, cut1, cut2, y, expect_y;
  int checks = 0, failures = 0;

  cut_selector dut (.sel, .cut0, .cut1, .cut2, .y);

  initial begin
    for (int i = 0; i < 100; i++) begin
      cut0 = 5'($urandom); cut1 = 5'($urandom); cut2 = 5'($urandom);
      for (int s = 0; s < 4; s++) begin
        sel = 2'(s);
        #1;
        case (s)
          1: expect_y = cut1;
          2: expect_y = cut2;
          default: expect_y = cut0;
        endcase
        checks++;
        if (y !== expect_y) begin
          failures++;
          $display("FAIL: sel %0d y %0h expected %0h", s, y, expect_y);
        end
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
