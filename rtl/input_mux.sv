// input_mux: selects what drives the circuits under test.
//
// In test mode the CUTs see the LFSR patterns; in normal mode (idle, or a
// test suspended by HOLD) they see the external functional inputs, as the
// document describes.  Purely combinational.
//
// Interface: `test_mode` from the BIST controller, `pattern` from the LFSR,
// `ext_in` from outside, `y` to the three CUT replicas.
module input_mux #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             test_mode,
  input  logic [WIDTH-1:0] pattern,
  input  logic [WIDTH-1:0] ext_in,
  output logic [WIDTH-1:0] y
);

  always_comb y = test_mode ? pattern : ext_in;

endmodule
