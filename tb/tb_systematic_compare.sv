// tb_systematic_compare: every stored codeword (256) against every incoming
// tag (16), one comparison per clock. Each result is checked one clock after
// its inputs (the unit's latency) against the decision derived from the
// Hamming distance to the reference codeword of the tag; the weighted flags
// are checked against that distance too. Idle cycles between groups check
// that out_valid follows in_valid with a one-cycle delay and that reset
// clears it.
module tb_systematic_compare;
  import ecc_cmp_pkg::*;
  import tb_ecc_ref_pkg::*;

  logic          clk;
  logic          rst_n = 1'b0;
  logic          in_valid = 1'b0;
  codeword_t     codeword_in = '0;
  logic [3:0]    tag_in = '0;
  logic          out_valid, match, fault, mismatch;
  decision_t     decision;
  weight_flags_t flags;
  int checks = 0, failures = 0;
  int n_match = 0, n_fault = 0, n_mismatch = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  systematic_compare dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .codeword_in(codeword_in), .tag_in(tag_in),
    .out_valid(out_valid), .decision(decision), .flags(flags),
    .match(match), .fault(fault), .mismatch(mismatch)
  );

  task automatic check(input logic [7:0] cw, input logic [3:0] tag);
    int d = ref_distance(cw, tag);
    decision_t exp_dec = ref_decision(d);
    checks++;
    if (!out_valid) begin failures++; $display("FAIL out_valid low"); end
    checks++;
    if (decision != exp_dec || match != (exp_dec == DEC_MATCH) ||
        fault != (exp_dec == DEC_FAULT) || mismatch != (exp_dec == DEC_MISMATCH)) begin
      failures++;
      $display("FAIL cw=%h tag=%h d=%0d decision=%0d expected %0d", cw, tag, d, decision, exp_dec);
    end
    checks++;
    if (flags.q | flags.r | flags.s) begin
      if (d < 4) begin failures++; $display("FAIL d=%0d flags=%b", d, flags); end
    end else if (2 * int'(flags.t) + 2 * int'(flags.u) + int'(flags.v) != d) begin
      failures++;
      $display("FAIL d=%0d flags=%b", d, flags);
    end
    case (exp_dec)
      DEC_MATCH: n_match++;
      DEC_FAULT: n_fault++;
      default:   n_mismatch++;
    endcase
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid set in reset"); end
    rst_n = 1'b1;
    for (int t = 0; t < 16; t++) begin
      for (int c = 0; c < 256; c++) begin
        in_valid    = 1'b1;
        codeword_in = codeword_t'(8'(c));
        tag_in      = 4'(t);
        @(posedge clk);
        #1 check(8'(c), 4'(t));
      end
      // One idle cycle: out_valid must drop one clock after in_valid.
      in_valid = 1'b0;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid after idle"); end
    end
    checks++;
    if (n_match != 16 * 9 || n_fault != 16 * 28) begin
      failures++;
      $display("FAIL counts match=%0d fault=%0d", n_match, n_fault);
    end
    $display("match=%0d fault=%0d mismatch=%0d", n_match, n_fault, n_mismatch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
