// tb_misr: self-checking testbench of the multiple-input signature register.
//
// Drives 200 random 5-bit response words into an 8-bit MISR and compares the
// signature after every clock with a reference model written from the
// polynomial x^8+x^6+x^5+x^4+1.  Also checks that `enable` low holds the
// signature, that `clear` zeroes it, and that a single flipped response bit
// gives a different signature.
module tb_misr;
  localparam int W = 8, IW = 5;
  logic clk = 0, rst_n = 0, clear = 0, enable = 0;
  logic [IW-1:0] d = '0;
  logic [W-1:0] signature;
  int checks = 0, failures = 0;

  misr #(.WIDTH(W), .IN_WIDTH(IW)) dut (.clk, .rst_n, .clear, .enable, .d, .signature);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [W-1:0] ref_step(input logic [W-1:0] v, input logic [IW-1:0] x);
    logic [W-1:0] n;
    n = {1'b0, v[W-1:1]};
    if (v[0]) n ^= 8'b1011_1000;
    return n ^ {3'b000, x};
  endfunction

  logic [W-1:0] model, held, sig_a;
  logic [IW-1:0] words [200];

  initial begin
    repeat (2) @(negedge clk);
    check(signature === '0, "reset clears");
    rst_n = 1;
    foreach (words[i]) words[i] = IW'($urandom);
    model = '0;
    enable = 1;
    foreach (words[i]) begin
      d = words[i];
      @(negedge clk);
      model = ref_step(model, words[i]);
      check(signature === model, $sformatf("word %0d: got %0h expected %0h", i, signature, model));
    end
    sig_a = signature;
    enable = 0; d = 5'h1F;
    held = signature;
    repeat (4) @(negedge clk);
    check(signature === held, "enable low holds signature");
    clear = 1; enable = 1;
    @(negedge clk);
    clear = 0;
    check(signature === '0, "clear zeroes signature");
    // same stream with one bit flipped in word 17
    foreach (words[i]) begin
      d = (i == 17) ? words[i] ^ 5'b00100 : words[i];
      @(negedge clk);
    end
    enable = 0;
    check(signature !== sig_a, "single-bit error changes signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
