// cut_selector: picks the CUT replica whose responses go to the test MISR.
//
// A multiplexer with a two-bit select line over the three replicas, as the
// document describes: sel 0 = fault-free replica, 1 = stuck-at replica,
// 2 = bit-flip replica.  The document does not say what the fourth code does;
// here sel 3 also selects the fault-free replica.  Purely combinational.
module cut_selector
  import bist_pkg::*;
(
  input  logic [1:0]           sel,
  input  logic [CUT_OUT_W-1:0] cut0,
  input  logic [CUT_OUT_W-1:0] cut1,
  input  logic [CUT_OUT_W-1:0] cut2,
  output logic [CUT_OUT_W-1:0] y
);

  always_comb begin
    unique case (sel)
      2'd1:    y = cut1;
      2'd2:    y = cut2;
      default: y = cut0;
    endcase
  end

endmodule
