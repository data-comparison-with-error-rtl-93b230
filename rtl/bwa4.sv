// bwa4: 4-input butterfly weighted accumulator (BWA).
//
// Counts the ones among four bits of equal weight without building a binary
// adder. Two layers of half adders are wired as a butterfly:
//   layer 1: (x0,x1) -> s0 (w1), c0 (w2)      (x2,x3) -> s1 (w1), c1 (w2)
//   layer 2: (s0,s1) -> w1   (w1), w2[0] (w2) (c0,c1) -> w2[1] (w2), w4 (w4)
// The outputs are left as separate weighted bits, so that
//   popcount(x) = w1 + 2*(w2[0] + w2[1]) + 4*w4,
// and a later stage can merge bits of equal weight from several BWAs. Two
// layers of half adders is the whole delay. Combinational.
// The half-adder butterfly follows the source architecture; the exact
// pairing of sums with sums and carries with carries is this design's.
module bwa4 (
  input  logic [3:0] x,
  output logic       w1,   // weight 1
  output logic [1:0] w2,   // two bits of weight 2
  output logic       w4    // weight 4
);
  logic s0, c0, s1, c1;

  half_adder u_ha_l1_0 (.a(x[0]), .b(x[1]), .sum(s0),    .carry(c0));
  half_adder u_ha_l1_1 (.a(x[2]), .b(x[3]), .sum(s1),    .carry(c1));
  half_adder u_ha_l2_0 (.a(s0),   .b(s1),   .sum(w1),    .carry(w2[0]));
  half_adder u_ha_l2_1 (.a(c0),   .b(c1),   .sum(w2[1]), .carry(w4));
endmodule
