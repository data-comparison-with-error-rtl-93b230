// xor_bank: bitwise XOR of two equal-width fields.
//
// One XOR gate per bit position; a 1 in `diff` marks a bit where the two
// fields differ, so the number of ones in `diff` is their Hamming distance.
// The comparator uses one bank for the tag field and one for the parity
// field, so that both halves of the distance are counted in parallel.
// Combinational. WIDTH defaults to the 4-bit tag/parity field.
// The two-bank split follows the source architecture.
module xor_bank #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] diff
);
  always_comb diff = a ^ b;
endmodule
