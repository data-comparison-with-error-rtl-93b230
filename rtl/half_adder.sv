// half_adder: the one-bit cell all butterfly weighted accumulators are made of.
//
// sum = a XOR b carries the weight of the inputs; carry = a AND b carries
// twice that weight, so a + b = sum + 2*carry. Purely combinational.
// The half adder as the counting cell follows the source architecture.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
