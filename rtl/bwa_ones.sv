// bwa_ones: butterfly weighted accumulator for the weight-1 bits ("BWA for 1's").
//
// Merges the weight-1 bit of the tag BWA with that of the parity BWA: one
// half adder, whose sum v keeps weight 1 and whose carry u has weight 2.
// u and v are never both set. Combinational.
// The block comes from the source architecture; its inside (one half adder)
// and the assignment of u and v are this design's.
module bwa_ones (
  input  logic [1:0] z,   // two bits of weight 1
  output logic       u,   // weight 2
  output logic       v    // weight 1
);
  half_adder u_ha (.a(z[0]), .b(z[1]), .sum(v), .carry(u));
endmodule
