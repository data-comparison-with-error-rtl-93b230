// tb_ecc_tag_compare_top: end-to-end test of the whole design at its default
// configuration.
//   1. Generator mode: two full generator periods (510 comparisons). Every
//      result is checked against the reference decision for the pair the
//      generator showed one clock earlier.
//   2. Mode switch to external inputs: stored codewords are built from random
//      tags with 0..4 bits flipped, so that exact matches, corrected matches,
//      faults and both kinds of mismatch all occur; the generator must hold.
//   3. Switch back to generator mode; it must resume where it stopped.
// Every event kind is counted, and one that never happened is a failure.
module tb_ecc_tag_compare_top;
  import ecc_cmp_pkg::*;
  import tb_ecc_ref_pkg::*;

  logic          clk;
  logic          rst_n = 1'b0;
  logic          ext_mode = 1'b0;
  logic          gen_enable = 1'b0;
  logic          ext_valid = 1'b0;
  codeword_t     ext_codeword = '0;
  logic [3:0]    ext_tag = '0;
  codeword_t     gen_codeword;
  logic [3:0]    gen_tag;
  logic          result_valid, match, fault, mismatch;
  decision_t     decision;
  weight_flags_t flags;

  int checks = 0, failures = 0;
  int n_exact = 0, n_corrected = 0, n_fault = 0, n_mis3 = 0, n_mis4 = 0;
  int n_gen = 0, n_ext = 0, n_switch = 0, n_hold = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  ecc_tag_compare_top dut (
    .clk(clk), .rst_n(rst_n), .ext_mode(ext_mode), .gen_enable(gen_enable),
    .ext_valid(ext_valid), .ext_codeword(ext_codeword), .ext_tag(ext_tag),
    .gen_codeword(gen_codeword), .gen_tag(gen_tag),
    .result_valid(result_valid), .decision(decision), .flags(flags),
    .match(match), .fault(fault), .mismatch(mismatch)
  );

  task automatic check(input logic [7:0] cw, input logic [3:0] tag);
    int d = ref_distance(cw, tag);
    decision_t exp_dec = ref_decision(d);
    checks++;
    if (!result_valid || decision != exp_dec || match != (exp_dec == DEC_MATCH) ||
        fault != (exp_dec == DEC_FAULT) || mismatch != (exp_dec == DEC_MISMATCH)) begin
      failures++;
      $display("FAIL cw=%h tag=%h d=%0d valid=%b decision=%0d expected %0d",
               cw, tag, d, result_valid, decision, exp_dec);
    end
    // Below distance 4 the weighted flags must add up to the distance.
    checks++;
    if (!(flags.q | flags.r | flags.s) &&
        2 * int'(flags.t) + 2 * int'(flags.u) + int'(flags.v) != d) begin
      failures++;
      $display("FAIL d=%0d flags=%b", d, flags);
    end
    if (d == 0)      n_exact++;
    else if (d == 1) n_corrected++;
    else if (d == 2) n_fault++;
    else if (d == 3) n_mis3++;
    else             n_mis4++;
  endtask

  task automatic run_gen(input int n);
    logic [7:0] cw;
    logic [3:0] tg;
    ext_mode   <= 1'b0;
    ext_valid  <= 1'b0;
    gen_enable <= 1'b1;
    for (int i = 0; i < n; i++) begin
      #1;
      cw = gen_codeword;
      tg = gen_tag;
      @(posedge clk); #1;
      check(cw, tg);
      n_gen++;
    end
    gen_enable <= 1'b0;
  endtask

  initial begin
    logic [7:0] held_cw;
    logic [3:0] held_tag;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    run_gen(510);

    // Switch to external inputs while the generator is asked to run.
    held_cw  = gen_codeword;
    held_tag = gen_tag;
    ext_mode   <= 1'b1;
    gen_enable <= 1'b1;
    n_switch++;
    for (int i = 0; i < 400; i++) begin
      logic [3:0] t, t2;
      logic [7:0] flip;
      int nflip;
      t     = 4'($urandom);
      t2    = 4'($urandom);
      flip  = '0;
      nflip = i % 5;
      while ($countones(flip) < nflip) flip[$urandom % 8] = 1'b1;
      // Every eighth comparison uses an unrelated stored tag.
      ext_codeword <= codeword_t'((i % 8 == 7) ? ref_codeword(t2) : (ref_codeword(t) ^ flip));
      ext_tag      <= t;
      ext_valid    <= 1'b1;
      @(posedge clk); #1;
      check(ext_codeword, ext_tag);
      n_ext++;
    end
    ext_valid <= 1'b0;
    @(posedge clk); #1;
    checks++;
    if (result_valid) begin failures++; $display("FAIL result_valid with ext_valid low"); end
    checks++;
    if (gen_codeword != held_cw || gen_tag != held_tag) begin
      failures++;
      $display("FAIL generator moved in external mode");
    end else n_hold++;

    n_switch++;
    run_gen(40);

    $display("exact=%0d corrected=%0d fault=%0d mismatch3=%0d mismatch4+=%0d gen=%0d ext=%0d switch=%0d hold=%0d",
             n_exact, n_corrected, n_fault, n_mis3, n_mis4, n_gen, n_ext, n_switch, n_hold);
    checks++;
    if (n_exact == 0 || n_corrected == 0 || n_fault == 0 || n_mis3 == 0 || n_mis4 == 0 ||
        n_gen == 0 || n_ext == 0 || n_switch < 2 || n_hold == 0) begin
      failures++;
      $display("FAIL an event never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
