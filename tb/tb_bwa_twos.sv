// tb_bwa_twos: exhaustive check of the BWA for 2's. For n ones at its four
// weight-2 inputs, t must be the low bit of n and r|s must be set exactly
// when n >= 2; s alone is the carry of the two layer-1 sums.
module tb_bwa_twos;
  logic [3:0] y;
  logic t, r, s;
  int checks = 0, failures = 0;

  bwa_twos dut (.y(y), .t(t), .r(r), .s(s));

  initial begin
    for (int i = 0; i < 16; i++) begin
      int n;
      y = 4'(i);
      #1;
      n = $countones(y);
      checks++;
      if (t != n[0]) begin failures++; $display("FAIL y=%b t=%b", y, t); end
      checks++;
      if ((r | s) != (n >= 2)) begin failures++; $display("FAIL y=%b r=%b s=%b", y, r, s); end
      checks++;
      if (r != ((y[0] & y[1]) | (y[2] & y[3]))) begin failures++; $display("FAIL y=%b r=%b", y, r); end
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
