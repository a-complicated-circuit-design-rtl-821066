// misr: multiple-input signature register.
//
// Compresses an IN_WIDTH-bit response stream into a WIDTH-bit signature.  Each
// enabled clock the register shifts right with the feedback of a
// maximal-length polynomial (the same Galois form as the LFSR) and XORs the
// response word into its low IN_WIDTH bits.  While `enable` is low the
// signature is held, which is how the BIST suspends signature generation
// during HOLD and lets an intermediate signature be read out.
// The document gives the MISR's function; its width, polynomial and the way
// narrower responses are padded are this design's choices.
//
// Interface: `clear` (synchronous, wins over `enable`) sets the signature to 0;
// `enable` captures `d` at the clock edge; `signature` is the register.
// Asynchronous active-low `rst_n` also clears it.
module misr #(
  parameter int unsigned WIDTH    = 16,
  parameter int unsigned IN_WIDTH = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                enable,
  input  logic [IN_WIDTH-1:0] d,
  output logic [WIDTH-1:0]    signature
);

  localparam logic [WIDTH-1:0] MASK = WIDTH'(bist_pkg::galois_mask(WIDTH));

  initial assert (IN_WIDTH <= WIDTH) else $error("misr: IN_WIDTH must not exceed WIDTH");

  logic [WIDTH-1:0] next;

  always_comb begin
    next = signature >> 1;
    if (signature[0]) next = next ^ MASK;
    next = next ^ WIDTH'(d);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      signature <= '0;
    else if (clear)  signature <= '0;
    else if (enable) signature <= next;
  end

endmodule
