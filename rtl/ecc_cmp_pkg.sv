// ecc_cmp_pkg: types and constants shared by the ECC tag comparator.
//
// The comparator works on an (8,4) systematic code: a stored codeword is the
// 4-bit tag followed by 4 parity bits, and the code corrects one error
// (T_MAX = 1) and detects two (R_MAX = 2). These sizes are the configuration
// the design is built and evaluated for. The bit layout of the codeword
// ({tag, parity}) and the 2-bit encoding of the decision are this design's
// own choices.
package ecc_cmp_pkg;

  localparam int unsigned TAG_W = 4;              // information bits m
  localparam int unsigned PAR_W = 4;              // parity bits n - m
  localparam int unsigned CW_W  = TAG_W + PAR_W;  // code length n
  localparam int unsigned T_MAX = 1;              // correctable errors
  localparam int unsigned R_MAX = 2;              // detectable errors

  // Outcome of one comparison.
  typedef enum logic [1:0] {
    DEC_MATCH    = 2'd0,  // d <= T_MAX: stored word is the incoming tag (maybe after correction)
    DEC_FAULT    = 2'd1,  // T_MAX < d <= R_MAX: detectable, uncorrectable error in the stored word
    DEC_MISMATCH = 2'd2   // d > R_MAX: a different tag
  } decision_t;

  // Weighted partial counts that feed the decision unit.
  // q, r, s carry weight 4 (any of them set means d >= 4), t and u weight 2,
  // v weight 1. When q, r and s are all clear, d = 2*t + 2*u + v.
  typedef struct packed {
    logic q;
    logic r;
    logic s;
    logic t;
    logic u;
    logic v;
  } weight_flags_t;

  // A stored (retrieved) codeword, systematic: tag bits, then parity bits.
  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [PAR_W-1:0] parity;
  } codeword_t;

endpackage
