// hold_logic: scan-loadable hold point that lets a BIST run be restarted
// from a selected pattern and advanced to any later one.
//
// A small scan chain holds an arm bit and a pattern index `hold_at`.  While
// armed, and while the controller is in TEST or HOLD, `auto_hold` is high as
// soon as `pattern_count` equals `hold_at`: the run stops with exactly
// `hold_at` patterns compressed, and the intermediate signature can be read.
// Scanning in a later index lets the run continue to that pattern; scanning
// in a cleared arm bit lets it run to the end.  The external HOLD input
// works as before and is ORed with `auto_hold`, so the run resumes only when
// both are low.  The document names a scan-loadable signature hold
// flip-flop for this purpose and the incremental reporting of intermediate
// MISR signatures; the chain layout and the compare are this design's own.
//
// Scan: while `scan_en` is high the chain {armed, hold_at} shifts right by
// one bit per clock, `scan_in` entering at the arm bit and `scan_out` being
// bit 0 of `hold_at`.  Shifting CW+1 bits loads `hold_at` LSB first, then the
// arm bit.  While `scan_en` is high during a run `auto_hold` is high too,
// so a new hold point can be loaded while the run is held without the
// intermediate chain contents letting it slip forward.  Asynchronous
// active-low reset disarms the chain.
// `auto_hold` is combinational from the registers and `pattern_count`.
module hold_logic #(
  parameter int unsigned CW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          scan_en,
  input  logic          scan_in,
  output logic          scan_out,
  input  logic          in_run,        // controller in TEST or HOLD
  input  logic [CW-1:0] pattern_count,
  output logic          auto_hold
);

  logic [CW:0] chain;   // chain[CW] = armed, chain[CW-1:0] = hold_at

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       chain <= '0;
    else if (scan_en) chain <= {scan_in, chain[CW:1]};
  end

  always_comb begin
    scan_out  = chain[0];
    // Shifting passes through arbitrary values, so the run is also frozen
    // while the chain is being loaded.
    auto_hold = in_run && (scan_en || (chain[CW] && (pattern_count == chain[CW-1:0])));
  end

endmodule
