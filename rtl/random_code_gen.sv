// random_code_gen: pseudo-random stimulus for the tag comparator.
//
// Two LFSRs run side by side: an 8-bit one supplies the retrieved codeword
// and a 4-bit one the incoming tag, so that a comparator can be exercised
// with a new pair every enabled clock. The 8-bit register repeats after 255
// steps and the 4-bit one after 15; since 15 divides 255, the pair sequence
// repeats after 255 steps. Polynomials (x^8+x^6+x^5+x^4+1 and x^4+x^3+1) and
// seeds are this design's choices.
// Interface/timing: codeword and tag are register outputs; they advance on
// each rising clock edge with enable high. rst_n (active low, synchronous)
// reloads the seeds.
module random_code_gen
  import ecc_cmp_pkg::*;
#(
  parameter logic [CW_W-1:0]  CW_SEED  = 8'h5A,
  parameter logic [TAG_W-1:0] TAG_SEED = 4'h1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  output codeword_t        codeword,
  output logic [TAG_W-1:0] tag
);
  logic [CW_W-1:0] cw_state;

  lfsr #(.WIDTH(CW_W),  .TAPS(8'hB8), .SEED(CW_SEED))
    u_lfsr_cw  (.clk(clk), .rst_n(rst_n), .en(enable), .state(cw_state));
  lfsr #(.WIDTH(TAG_W), .TAPS(4'hC),  .SEED(TAG_SEED))
    u_lfsr_tag (.clk(clk), .rst_n(rst_n), .en(enable), .state(tag));

  always_comb codeword = codeword_t'(cw_state);
endmodule
