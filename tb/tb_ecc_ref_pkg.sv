// tb_ecc_ref_pkg: reference model used by the comparator testbenches.
//
// The (8,4) code is described here by its generator rows (the parity bits a
// single tag bit contributes) rather than by parity equations, and the
// decision is derived from the Hamming distance counted with $countones, so
// that the expected values do not share structure with the RTL.
package tb_ecc_ref_pkg;
  import ecc_cmp_pkg::*;

  // Parity contribution of tag bit i, {p3,p2,p1,p0}.
  localparam logic [3:0] GEN_ROW [4] = '{4'b1011, 4'b1101, 4'b1110, 4'b0111};

  function automatic logic [3:0] ref_parity(input logic [3:0] tag);
    logic [3:0] p = '0;
    for (int i = 0; i < 4; i++) if (tag[i]) p ^= GEN_ROW[i];
    return p;
  endfunction

  function automatic logic [7:0] ref_codeword(input logic [3:0] tag);
    return {tag, ref_parity(tag)};
  endfunction

  function automatic int ref_distance(input logic [7:0] cw, input logic [3:0] tag);
    return $countones(cw ^ ref_codeword(tag));
  endfunction

  function automatic decision_t ref_decision(input int d);
    if (d <= int'(T_MAX))      return DEC_MATCH;
    else if (d <= int'(R_MAX)) return DEC_FAULT;
    else                       return DEC_MISMATCH;
  endfunction
endpackage
