// bist_ref_pkg: reference model of the BIST data path for the testbenches.
//
// Written from the design's stated conventions, not from its RTL: the 8-bit
// LFSR uses x^8+x^6+x^5+x^4+1 and the 16-bit MISR x^16+x^14+x^13+x^11+1, both
// in right-shifting form, with seed 1 and a zero initial signature, and the circuit under test is a 4-bit
// adder whose faults are modelled arithmetically.  `signature_after`
// returns the MISR contents after the first n patterns for a given fault.
package bist_ref_pkg;
  import bist_pkg::*;

  function automatic logic [7:0] step8(input logic [7:0] v);
    logic [7:0] n;
    n = {1'b0, v[7:1]};
    if (v[0]) n ^= 8'b1011_1000;
    return n;
  endfunction

  function automatic logic [15:0] step16(input logic [15:0] v);
    logic [15:0] n;
    n = {1'b0, v[15:1]};
    if (v[0]) n ^= 16'hB400;
    return n;
  endfunction

  function automatic logic apply(input logic v, input fault_mode_e m);
    case (m)
      FAULT_SA0:  return 1'b0;
      FAULT_SA1:  return 1'b1;
      FAULT_FLIP: return ~v;
      default:    return v;
    endcase
  endfunction

  // Output of the 4-bit adder (a = x[3:0], b = x[7:4]) with a fault on `site`.
  function automatic logic [4:0] adder(input logic [7:0] x, input fault_mode_e m, input int site);
    logic [4:0] a, b, r, low, high, mask;
    a = {1'b0, x[3:0]};
    b = {1'b0, x[7:4]};
    if (m == FAULT_NONE) return a + b;
    if (site < 4)      a[site]     = apply(a[site], m);
    else if (site < 8) b[site - 4] = apply(b[site - 4], m);
    if (site < 8) return a + b;
    if (site <= 10) begin
      mask = 5'((1 << (site - 7)) - 1);
      low  = (a & mask) + (b & mask);
      high = (a >> (site - 7)) + (b >> (site - 7)) + 5'(apply(low[site - 7], m));
      return 5'((high << (site - 7)) | (low & mask));
    end
    r = a + b;
    if (site <= 14) r[site - 11] = apply(r[site - 11], m);
    else            r[4]         = apply(r[4], m);
    return r;
  endfunction

  function automatic logic [15:0] signature_after(input int n, input fault_mode_e m, input int site);
    logic [7:0]  pat;
    logic [15:0] sig;
    pat = 8'd1;
    sig = 16'd0;
    for (int i = 0; i < n; i++) begin
      sig = step16(sig) ^ {11'd0, adder(pat, m, site)};
      pat = step8(pat);
    end
    return sig;
  endfunction

  function automatic logic [7:0] pattern_after(input int n);
    logic [7:0] pat;
    pat = 8'd1;
    for (int i = 0; i < n; i++) pat = step8(pat);
    return pat;
  endfunction
endpackage
