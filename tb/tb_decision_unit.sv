// tb_decision_unit: all 64 combinations of q..v. Where u and v are not both
// set (the only combinations the BWAs produce), the expected result comes
// from the distance 4*(q|r|s) + 2t + 2u + v and the thresholds T_MAX, R_MAX.
// The unreachable u = v = 1 rows are checked against the truth table.
module tb_decision_unit;
  import ecc_cmp_pkg::*;
  import tb_ecc_ref_pkg::*;
  weight_flags_t flags;
  decision_t     decision, expected;
  int checks = 0, failures = 0;

  decision_unit dut (.flags(flags), .decision(decision));

  initial begin
    for (int i = 0; i < 64; i++) begin
      flags = weight_flags_t'(6'(i));
      #1;
      if (flags.u && flags.v) begin
        if (flags.q || flags.r || flags.s || flags.t) expected = DEC_MISMATCH;
        else                                       expected = DEC_FAULT;
      end else begin
        expected = ref_decision(((flags.q || flags.r || flags.s) ? 4 : 0)
                                + 2 * int'(flags.t) + 2 * int'(flags.u) + int'(flags.v));
      end
      checks++;
      if (decision != expected) begin
        failures++;
        $display("FAIL flags=%b decision=%0d expected %0d", flags, decision, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
