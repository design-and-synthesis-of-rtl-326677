// lfsr_pkg: constants and types shared by the LFSR test-pattern generator,
// the signature register and the BIST controller.
//
// The 32-bit characteristic polynomial is P(x) = x^32 + x^22 + x^2 + x + 1.
// It is stored as a tap mask: bit k-1 of the mask is set when the term x^k
// is present (k = 1..n); the constant term is implied. The 8- and 16-bit
// masks (x^8+x^6+x^5+x^4+1 and x^16+x^15+x^13+x^4+1) are standard
// maximal-length polynomials used only for the smaller comparison
// configurations; they are not part of the 32-bit design.
package lfsr_pkg;

  // x^32 + x^22 + x^2 + x^1 + 1 -> taps at bits 31, 21, 1, 0
  localparam logic [31:0] LFSR32_TAPS = 32'h8020_0003;
  // x^16 + x^15 + x^13 + x^4 + 1 -> taps at bits 15, 14, 12, 3
  localparam logic [15:0] LFSR16_TAPS = 16'hD008;
  // x^8 + x^6 + x^5 + x^4 + 1 -> taps at bits 7, 5, 4, 3
  localparam logic [7:0]  LFSR8_TAPS  = 8'hB8;

  // Number of intermediate vectors the low-power generator inserts between
  // two successive LFSR states (Ta, Tb, Tc), and so the number of output
  // vectors per LFSR step.
  localparam int unsigned LP_INTERMEDIATE = 3;
  localparam int unsigned LP_PHASES       = LP_INTERMEDIATE + 1;

  // Default maximal-length tap mask for a register of the given width
  // (32, 16 or 8 bits); other widths must pass their own mask.
  function automatic logic [31:0] default_taps(int unsigned width);
    case (width)
      8:       return 32'(LFSR8_TAPS);
      16:      return 32'(LFSR16_TAPS);
      default: return LFSR32_TAPS;
    endcase
  endfunction

  // BIST controller unit states.
  typedef enum logic [2:0] {
    BCU_NORMAL  = 3'd0,  // normal mode: CUT driven from its primary inputs
    BCU_SEED    = 3'd1,  // load TPG seed, clear MISR and analyzer
    BCU_RUN     = 3'd2,  // apply patterns, compress responses
    BCU_FLUSH   = 3'd3,  // let the last responses through a pipelined CUT
    BCU_COMPARE = 3'd4,  // analyzer compares the signature
    BCU_DONE    = 3'd5   // Go/No-go valid until Normal/Test returns to normal
  } bcu_state_e;

endpackage
