// tb_cut_adder: self-checking testbench of the circuit under test with its
// fault-injection logic.
//
// For every one of the 256 operand pairs it checks the fault-free sum, and
// then every fault site under stuck-at-0, stuck-at-1 and bit-flip.  Expected
// values are computed arithmetically: a fault on an operand bit changes the
// operand, a fault on a sum or carry-out bit changes that output bit, and a
// fault on the carry into bit k+1 is modelled by adding the low k+1 bits and
// the high bits separately with the faulted carry between them.
module tb_cut_adder;
  import bist_pkg::*;
  logic [7:0]  in_bits;
  fault_mode_e fault_mode;
  logic [3:0]  fault_site;
  logic [4:0]  out_bits;
  int checks = 0, failures = 0;

  cut_adder dut (.in_bits, .fault_mode, .fault_site, .out_bits);

  function automatic logic apply(input logic v, input fault_mode_e m);
    case (m)
      FAULT_SA0:  return 1'b0;
      FAULT_SA1:  return 1'b1;
      FAULT_FLIP: return ~v;
      default:    return v;
    endcase
  endfunction

  function automatic logic [4:0] model(input logic [7:0] x, input fault_mode_e m, input int site);
    logic [4:0] a, b, r, low, high;
    int k;
    a = {1'b0, x[3:0]};
    b = {1'b0, x[7:4]};
    if (m == FAULT_NONE) return a + b;
    if (site < 4)  a[site]     = apply(a[site], m);
    else if (site < 8) b[site - 4] = apply(b[site - 4], m);
    if (site < 8) return a + b;
    if (site <= 10) begin
      k = site - 8;                       // carry out of bit k
      low  = (a & 5'((1 << (k + 1)) - 1)) + (b & 5'((1 << (k + 1)) - 1));
      high = (a >> (k + 1)) + (b >> (k + 1)) + 5'(apply(low[k + 1], m));
      return 5'((high << (k + 1)) | (low & 5'((1 << (k + 1)) - 1)));
    end
    r = a + b;
    if (site <= 14) r[site - 11] = apply(r[site - 11], m);
    else            r[4]         = apply(r[4], m);
    return r;
  endfunction

  initial begin
    for (int x = 0; x < 256; x++) begin
      in_bits = 8'(x);
      fault_mode = FAULT_NONE; fault_site = 4'($urandom);
      #1;
      checks++;
      if (out_bits !== 5'(x[3:0] + x[7:4])) begin
        failures++; $display("FAIL: fault-free %0h -> %0h", x, out_bits);
      end
      for (int m = 1; m < 4; m++) begin
        for (int s = 0; s < 16; s++) begin
          fault_mode = fault_mode_e'(m);
          fault_site = 4'(s);
          #1;
          checks++;
          if (out_bits !== model(8'(x), fault_mode_e'(m), s)) begin
            failures++;
            $display("FAIL: in %0h mode %0d site %0d got %0h expected %0h",
                     x, m, s, out_bits, model(8'(x), fault_mode_e'(m), s));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
