// or_gate_tree: balanced tree of 2-input OR gates.
//
// Reduces N bits to one that is set when any input is set. The comparator
// uses it for the weight-4 outputs of the tag and parity BWAs: once any
// weight-4 bit is set the distance is at least 4, beyond what the decision
// needs to count exactly, so these bits are ORed instead of added. Level 0
// holds the inputs padded with zeros to a power of two; each further level
// ORs neighbouring pairs, so the depth is ceil(log2 N) gates. Combinational.
// N defaults to the two weight-4 bits of the (8,4) comparator.
// The OR tree comes from the source architecture; which bits it takes is
// this design's choice.
module or_gate_tree #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] in,
  output logic         any
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned LEAVES = 1 << LEVELS;

  logic [LEVELS:0][LEAVES-1:0] node;

  always_comb begin
    node = '0;
    node[0][N-1:0] = in;
    for (int l = 0; l < int'(LEVELS); l++)
      for (int i = 0; i < int'(LEAVES >> (l + 1)); i++)
        node[l+1][i] = node[l][2*i] | node[l][2*i+1];
    any = node[LEVELS][0];
  end
endmodule
