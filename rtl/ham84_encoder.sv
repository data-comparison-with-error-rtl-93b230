// ham84_encoder: parity generator of the (8,4) extended Hamming code.
//
// The incoming 4-bit tag is turned into the 4 parity bits that a stored
// codeword for that tag carries, so that the tag can be compared with a
// stored codeword in the encoded domain instead of decoding the stored word.
// Three parity bits are those of the (7,4) Hamming code; the fourth is the
// overall parity that makes every codeword have even weight and raises the
// minimum distance from 3 to 4 (single error correction, double error
// detection). The exact parity equations are this design's choice; any
// (8,4) code with minimum distance 4 works with the rest of the comparator.
//   p[0] = t[0]^t[1]^t[3]   p[1] = t[0]^t[2]^t[3]
//   p[2] = t[1]^t[2]^t[3]   p[3] = t[0]^t[1]^t[2]
// Combinational.
module ham84_encoder
  import ecc_cmp_pkg::*;
(
  input  logic [TAG_W-1:0] tag,
  output logic [PAR_W-1:0] parity
);
  always_comb begin
    parity[0] = tag[0] ^ tag[1] ^ tag[3];
    parity[1] = tag[0] ^ tag[2] ^ tag[3];
    parity[2] = tag[1] ^ tag[2] ^ tag[3];
    parity[3] = tag[0] ^ tag[1] ^ tag[2];
  end
endmodule
