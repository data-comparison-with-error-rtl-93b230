// tb_bwa_ones: exhaustive check of the BWA for 1's (2u + v = ones at input).
module tb_bwa_ones;
  logic [1:0] z;
  logic u, v;
  int checks = 0, failures = 0;

  bwa_ones dut (.z(z), .u(u), .v(v));

  initial begin
    for (int i = 0; i < 4; i++) begin
      z = 2'(i);
      #1;
      checks++;
      if (2 * int'(u) + int'(v) != $countones(z)) begin
        failures++;
        $display("FAIL z=%b u=%b v=%b", z, u, v);
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
