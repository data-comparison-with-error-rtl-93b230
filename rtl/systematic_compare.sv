// systematic_compare: tag comparison against an ECC-protected stored codeword.
//
// A cache keeps each tag as an (8,4) systematic codeword {tag, parity}. To
// decide whether an incoming tag hits, this unit does not decode the stored
// word. It encodes the incoming tag instead and counts, in parallel for the
// two fields, where the two codewords differ:
//   - tag field:    XOR bank (stored tag ^ incoming tag)       -> BWA for tags
//   - parity field: XOR bank (stored parity ^ encoded parity)  -> BWA for parities
// The interconnection then sorts the BWA outputs by weight: the two weight-4
// bits go to an OR gate tree (q), the four weight-2 bits to the BWA for 2's
// (t, r, s), the two weight-1 bits to the BWA for 1's (u, v). The decision
// unit turns these into match (d <= 1), fault (d = 2) or mismatch (d >= 3).
// The structure follows the systematic-code comparator this design is built
// on; the register stage and the valid handshake are this design's choices.
//
// Interface: present codeword_in and tag_in with in_valid high for one clock.
// Timing: one register stage; decision, flags and out_valid appear on the
// clock edge that samples the inputs (latency 1 cycle, one comparison per
// cycle). rst_n is an active-low synchronous reset that clears out_valid and
// the registered outputs.
module systematic_compare
  import ecc_cmp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  codeword_t        codeword_in,  // retrieved codeword {tag, parity}
  input  logic [TAG_W-1:0] tag_in,       // incoming tag
  output logic             out_valid,
  output decision_t        decision,
  output weight_flags_t    flags,        // q..v of this comparison
  output logic             match,
  output logic             fault,
  output logic             mismatch
);
  // Encoder and XOR banks.
  logic [PAR_W-1:0] enc_parity;
  logic [TAG_W-1:0] tag_diff;
  logic [PAR_W-1:0] par_diff;

  ham84_encoder u_encoder (.tag(tag_in), .parity(enc_parity));
  xor_bank #(.WIDTH(TAG_W)) u_xor_tag (.a(codeword_in.tag),    .b(tag_in),     .diff(tag_diff));
  xor_bank #(.WIDTH(PAR_W)) u_xor_par (.a(codeword_in.parity), .b(enc_parity), .diff(par_diff));

  // BWA for tags and BWA for parities.
  logic       tag_w1, tag_w4, par_w1, par_w4;
  logic [1:0] tag_w2, par_w2;

  bwa4 u_bwa_tag (.x(tag_diff), .w1(tag_w1), .w2(tag_w2), .w4(tag_w4));
  bwa4 u_bwa_par (.x(par_diff), .w1(par_w1), .w2(par_w2), .w4(par_w4));

  // Interconnection: group the BWA outputs by weight.
  logic [1:0] w4_bits;
  logic [3:0] w2_bits;
  logic [1:0] w1_bits;
  always_comb begin
    w4_bits = {par_w4, tag_w4};
    w2_bits = {par_w2, tag_w2};
    w1_bits = {par_w1, tag_w1};
  end

  // OR gate tree, BWA for 2's, BWA for 1's.
  weight_flags_t flags_c;
  or_gate_tree #(.N(2)) u_or_tree  (.in(w4_bits), .any(flags_c.q));
  bwa_twos              u_bwa_twos (.y(w2_bits), .t(flags_c.t), .r(flags_c.r), .s(flags_c.s));
  bwa_ones              u_bwa_ones (.z(w1_bits), .u(flags_c.u), .v(flags_c.v));

  // Decision unit.
  decision_t decision_c;
  decision_unit u_decision (.flags(flags_c), .decision(decision_c));

  // Output register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      decision  <= DEC_MATCH;
      flags     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        decision <= decision_c;
        flags    <= flags_c;
      end
    end
  end

  always_comb begin
    match    = out_valid && (decision == DEC_MATCH);
    fault    = out_valid && (decision == DEC_FAULT);
    mismatch = out_valid && (decision == DEC_MISMATCH);
  end

  // u and v come from one half adder and can never both be set.
  a_uv_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(flags_c.u && flags_c.v));
endmodule
