// bwa_twos: butterfly weighted accumulator for the weight-2 bits ("BWA for 2's").
//
// Takes the four weight-2 bits coming from the tag BWA and the parity BWA and
// merges them. Layer 1 is two half adders; layer 2 adds the two sums with a
// half adder, giving t (weight 2) and s (weight 4). The two layer-1 carries
// both have weight 4; since the decision only needs to know whether any
// weight-4 bit is set, the half adder that would add them is replaced by an
// OR gate, giving r. So 2*sum(y) = 2*t + 4*(count of weight-4 bits), and
// r | s is set exactly when the four inputs hold two or more ones.
// Combinational.
// The block and the use of OR gates in place of half adders come from the
// source architecture; the exact structure and the naming of t, r, s are
// this design's.
module bwa_twos (
  input  logic [3:0] y,   // four bits of weight 2
  output logic       t,   // weight 2
  output logic       r,   // weight 4 (OR of the layer-1 carries)
  output logic       s    // weight 4 (layer-2 carry)
);
  logic a0, b0, a1, b1;

  half_adder u_ha_l1_0 (.a(y[0]), .b(y[1]), .sum(a0), .carry(b0));
  half_adder u_ha_l1_1 (.a(y[2]), .b(y[3]), .sum(a1), .carry(b1));
  half_adder u_ha_l2   (.a(a0),   .b(a1),   .sum(t),  .carry(s));

  always_comb r = b0 | b1;
endmodule
