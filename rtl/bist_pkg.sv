// bist_pkg: types and constants shared by the restartable logic BIST design.
//
// It holds the six controller states, the fault-injection modes of the circuit
// under test (CUT), the CUT's port widths and the feedback masks of the
// maximal-length polynomials used by the pattern generator (LFSR) and by the
// signature registers (MISR).  The state names follow the document; the
// encodings, widths and polynomials are this design's own choices.
package bist_pkg;

  // Controller states, in the order the document lists them.
  typedef enum logic [2:0] {
    ST_START     = 3'd0,  // idle, waits for Test Mode
    ST_RESETTPG  = 3'd1,  // load the LFSR seed
    ST_RESETMISR = 3'd2,  // clear both signature registers
    ST_TEST      = 3'd3,  // apply patterns, compress responses
    ST_HOLD      = 3'd4,  // test suspended, CUT back on external inputs
    ST_BISTDONE  = 3'd5   // signatures compared, result valid
  } bist_state_e;

  // Fault injected into one wire of a CUT replica.
  typedef enum logic [1:0] {
    FAULT_NONE = 2'd0,
    FAULT_SA0  = 2'd1,    // wire stuck at 0
    FAULT_SA1  = 2'd2,    // wire stuck at 1
    FAULT_FLIP = 2'd3     // wire inverted (bit flip)
  } fault_mode_e;

  // The CUT is a 4-bit ripple-carry adder: two 4-bit operands in, 5 bits out.
  localparam int unsigned CUT_OPW   = 4;
  localparam int unsigned CUT_IN_W  = 2 * CUT_OPW;   // 8
  localparam int unsigned CUT_OUT_W = CUT_OPW + 1;   // 5
  localparam int unsigned SITE_W    = 4;             // 16 fault sites

  // Feedback mask of a maximal-length polynomial for a right-shifting
  // (Galois) register of the given width: when the bit shifted out is 1 the
  // mask is XORed into the shifted value.  Bit k-1 of the mask stands for the
  // term x^k of the polynomial.
  function automatic logic [31:0] galois_mask(input int unsigned width);
    case (width)
      3:       return 32'h0000_0006;  // x^3+x^2+1
      4:       return 32'h0000_000C;  // x^4+x^3+1
      5:       return 32'h0000_0014;  // x^5+x^3+1
      6:       return 32'h0000_0030;  // x^6+x^5+1
      7:       return 32'h0000_0060;  // x^7+x^6+1
      8:       return 32'h0000_00B8;  // x^8+x^6+x^5+x^4+1
      9:       return 32'h0000_0110;  // x^9+x^5+1
      10:      return 32'h0000_0240;  // x^10+x^7+1
      11:      return 32'h0000_0500;  // x^11+x^9+1
      12:      return 32'h0000_0E08;  // x^12+x^11+x^10+x^4+1
      13:      return 32'h0000_1C80;  // x^13+x^12+x^11+x^8+1
      14:      return 32'h0000_3802;  // x^14+x^13+x^12+x^2+1
      15:      return 32'h0000_6000;  // x^15+x^14+1
      16:      return 32'h0000_B400;  // x^16+x^14+x^13+x^11+1
      default: return 32'h0000_00B8;
    endcase
  endfunction

endpackage
