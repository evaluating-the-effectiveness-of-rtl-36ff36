// sdm_pkg: constants and types shared by the signature-based delay
// measurement (SDM) blocks.
//
// The scan flip-flop mode is set by two select lines, se0 and se1. The
// scan_mode_e type names the three legal combinations so that test
// sequencers can drive them symbolically; se0 is the MSB, se1 the LSB.
// The default signature polynomial is a maximal-length choice of this
// design; the document fixes only the register length (8 bits in its
// evaluation, 4 bits in its worked example).
package sdm_pkg;

  // {se0, se1}
  typedef enum logic [1:0] {
    MODE_NORMAL = 2'b00,   // capture functional input D
    MODE_LOAD   = 2'b10,   // reload the bit held in the extra latch
    MODE_SCAN   = 2'b11    // shift from si
  } scan_mode_e;

  // Signature register defaults (coefficients of x^0..x^(L-1); x^L implied).
  localparam int unsigned SIG_LEN_DEFAULT = 8;
  localparam logic [7:0]  SIG_POLY8       = 8'h1D;  // x^8+x^4+x^3+x^2+1

  // Minimum launch-to-capture spacing of the double pulse, in VCG
  // reference-clock periods (a pulse is one period high).
  localparam int unsigned VCG_MIN_CNT = 2;

endpackage
