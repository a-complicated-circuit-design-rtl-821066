// lfsr: test pattern generator (TPG) of the BIST.
//
// A WIDTH-bit linear feedback shift register in Galois form: each enabled
// clock it shifts right and, when the bit shifted out is 1, XORs the feedback
// mask of a maximal-length polynomial (bist_pkg::galois_mask) into the result.
// It therefore steps through all 2**WIDTH-1 non-zero values before repeating.
// The document asks for an LFSR with a seed and XOR feedback; the Galois form,
// the polynomial and the seed value are this design's choices.
//
// Interface: `clear` (synchronous, wins over `enable`) loads SEED; `enable`
// advances one step per clock; `q` is the current pattern, valid from the
// register, so a pattern applied in cycle n is the value loaded at edge n-1.
// Asynchronous active-low `rst_n` also loads SEED.
module lfsr #(
  parameter int unsigned    WIDTH = 8,
  parameter logic [WIDTH-1:0] SEED = WIDTH'(1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             enable,
  output logic [WIDTH-1:0] q
);

  localparam logic [WIDTH-1:0] MASK = WIDTH'(bist_pkg::galois_mask(WIDTH));

  initial assert (SEED != '0) else $error("lfsr: SEED must be non-zero");

  logic [WIDTH-1:0] next;

  always_comb begin
    next = q >> 1;
    if (q[0]) next = next ^ MASK;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= SEED;
    else if (clear)  q <= SEED;
    else if (enable) q <= next;
  end

endmodule
