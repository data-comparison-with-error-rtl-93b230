// decision_unit: classifies the Hamming distance of the comparison.
//
// Inputs are the weighted partial counts: q, r, s (weight 4), t, u (weight 2)
// and v (weight 1). Any weight-4 bit means d >= 4: mismatch. Otherwise
// d = 2t + 2u + v (u and v are never both set), and the truth table is
//   q|r|s  t u v   decision          distance
//     0    0 0 -   match             d = 0 or 1  (<= T_MAX)
//     0    0 1 -   fault             d = 2       (<= R_MAX)
//     0    1 0 0   fault             d = 2
//     0    1 0 1   mismatch          d = 3
//     0    1 1 -   mismatch          d = 4
//     1    - - -   mismatch          d >= 4
// The table is the design's decision rule for the (8,4) code; the 2-bit
// encoding of the result comes from ecc_cmp_pkg. Combinational.
module decision_unit
  import ecc_cmp_pkg::*;
(
  input  weight_flags_t flags,
  output decision_t     decision
);
  // The table above is worked out for these thresholds only.
  if (T_MAX != 1 || R_MAX != 2) begin : g_bad_thresholds
    $error("decision_unit: truth table is built for T_MAX = 1, R_MAX = 2");
  end

  always_comb begin
    if (flags.q | flags.r | flags.s)      decision = DEC_MISMATCH;
    else if (!flags.t && !flags.u)        decision = DEC_MATCH;
    else if (!flags.t &&  flags.u)        decision = DEC_FAULT;
    else if (!flags.u && !flags.v)        decision = DEC_FAULT;
    else                                  decision = DEC_MISMATCH;
  end
endmodule
