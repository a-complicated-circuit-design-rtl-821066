// fault_detector: decides whether the selected circuit under test is faulty.
//
// At the end of a BIST session the signature of the selected CUT is compared
// with the signature of the fault-free reference replica, compressed in
// parallel from the same patterns.  A mismatch means the circuit is faulty,
// as the document states.  The result is latched: `done` and exactly one of
// `pass`/`fail` stay high until the next session starts, so they can be read
// after the controller has returned to idle.  Using a second, reference MISR
// rather than a stored golden signature is this design's reading of the
// document's three-replica scheme.
//
// Timing: `evaluate` (controller in BISTDONE) is sampled at a clock edge and
// the result appears after that edge.  `clear` (a new session) drops the
// result.  Asynchronous active-low reset.
module fault_detector #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             evaluate,
  input  logic [WIDTH-1:0] signature,
  input  logic [WIDTH-1:0] ref_signature,
  output logic             pass,
  output logic             fail,
  output logic             done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pass <= 1'b0;
      fail <= 1'b0;
      done <= 1'b0;
    end else if (clear) begin
      pass <= 1'b0;
      fail <= 1'b0;
      done <= 1'b0;
    end else if (evaluate) begin
      pass <= (signature == ref_signature);
      fail <= (signature != ref_signature);
      done <= 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(pass && fail))
    else $error("fault_detector: pass and fail both high");

endmodule
