// ecc_tag_compare_top: ECC tag comparator with its pseudo-random code generator.
//
// The systematic comparator decides whether an incoming tag matches an
// (8,4)-protected stored codeword, may match it after a one-bit correction,
// hits an uncorrectable stored word (fault), or does not match. The random
// code generator, two LFSRs, supplies codeword/tag pairs to exercise it, as
// in the arrangement the design is built on. As this design's own addition,
// ext_mode selects external inputs instead, so the same comparator can sit in
// a cache's tag path.
//
// Interface: with ext_mode low, every clock with gen_enable high compares the
// generator's current pair (shown on gen_codeword/gen_tag) and advances the
// generator. With ext_mode high, ext_valid/ext_codeword/ext_tag are compared
// and the generator holds. Results appear one clock after the inputs are
// sampled, qualified by result_valid. rst_n is active-low, synchronous.
module ecc_tag_compare_top
  import ecc_cmp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ext_mode,
  input  logic             gen_enable,
  input  logic             ext_valid,
  input  codeword_t        ext_codeword,
  input  logic [TAG_W-1:0] ext_tag,
  output codeword_t        gen_codeword,
  output logic [TAG_W-1:0] gen_tag,
  output logic             result_valid,
  output decision_t        decision,
  output weight_flags_t    flags,
  output logic             match,
  output logic             fault,
  output logic             mismatch
);
  logic             gen_step;
  logic             cmp_valid;
  codeword_t        cmp_codeword;
  logic [TAG_W-1:0] cmp_tag;

  always_comb begin
    gen_step     = gen_enable && !ext_mode;
    cmp_valid    = ext_mode ? ext_valid    : gen_enable;
    cmp_codeword = ext_mode ? ext_codeword : gen_codeword;
    cmp_tag      = ext_mode ? ext_tag      : gen_tag;
  end

  random_code_gen u_gen (
    .clk(clk), .rst_n(rst_n), .enable(gen_step),
    .codeword(gen_codeword), .tag(gen_tag)
  );

  systematic_compare u_cmp (
    .clk(clk), .rst_n(rst_n),
    .in_valid(cmp_valid), .codeword_in(cmp_codeword), .tag_in(cmp_tag),
    .out_valid(result_valid), .decision(decision), .flags(flags),
    .match(match), .fault(fault), .mismatch(mismatch)
  );
endmodule
