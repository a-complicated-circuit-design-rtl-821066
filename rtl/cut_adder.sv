// cut_adder: circuit under test with fault-injection logic.
//
// The circuit is a 4-bit ripple-carry adder (out = a + b, a = in_bits[3:0],
// b = in_bits[7:4]).  Every one of its 16 wires passes through an injection
// point controlled by `fault_mode` and `fault_site`, so one instance can act
// as the fault-free reference, as a replica with a stuck-at-0 or stuck-at-1
// wire, or as a replica with a bit-flipped (inverted) wire.  The document
// uses three replicas of one circuit with such added logic; it does not name
// the circuit, so the adder and the site numbering are this design's choices.
//
// Fault sites (fault_site):
//   0..3   operand a[0..3]      4..7   operand b[0..3]
//   8..10  internal carries c1..c3
//   11..14 sum bits s[0..3]     15     carry out
//
// Interface: purely combinational; out_bits = {cout, s[3:0]}.
module cut_adder
  import bist_pkg::*;
(
  input  logic [CUT_IN_W-1:0]  in_bits,
  input  fault_mode_e          fault_mode,
  input  logic [SITE_W-1:0]    fault_site,
  output logic [CUT_OUT_W-1:0] out_bits
);

  // Apply the selected fault to the wire numbered `site`.
  function automatic logic inject(input logic v, input logic [SITE_W-1:0] site,
                                  input fault_mode_e mode,
                                  input logic [SITE_W-1:0] sel);
    if (sel != site) return v;
    case (mode)
      FAULT_SA0:  return 1'b0;
      FAULT_SA1:  return 1'b1;
      FAULT_FLIP: return ~v;
      default:    return v;
    endcase
  endfunction

  logic [CUT_OPW-1:0] a, b, s;
  logic               cy, cout;

  always_comb begin
    for (int i = 0; i < CUT_OPW; i++) begin
      a[i] = inject(in_bits[i],           SITE_W'(i),           fault_mode, fault_site);
      b[i] = inject(in_bits[CUT_OPW + i], SITE_W'(CUT_OPW + i), fault_mode, fault_site);
    end
    cy   = 1'b0;   // carry into bit i
    cout = 1'b0;
    for (int i = 0; i < CUT_OPW; i++) begin
      s[i] = inject(a[i] ^ b[i] ^ cy, SITE_W'(11 + i), fault_mode, fault_site);
      if (i + 1 < CUT_OPW)
        cy = inject((a[i] & b[i]) | (cy & (a[i] ^ b[i])), SITE_W'(8 + i), fault_mode, fault_site);
      else
        cout = inject((a[i] & b[i]) | (cy & (a[i] ^ b[i])), SITE_W'(15), fault_mode, fault_site);
    end
    out_bits = {cout, s};
  end

endmodule
