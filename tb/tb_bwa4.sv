// tb_bwa4: exhaustive check of the 4-input BWA: the weighted sum of its
// outputs must equal the number of ones at its input.
module tb_bwa4;
  logic [3:0] x;
  logic       w1, w4;
  logic [1:0] w2;
  int checks = 0, failures = 0;

  bwa4 dut (.x(x), .w1(w1), .w2(w2), .w4(w4));

  initial begin
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      checks++;
      if (int'(w1) + 2 * (int'(w2[0]) + int'(w2[1])) + 4 * int'(w4) != $countones(x)) begin
        failures++;
        $display("FAIL x=%b w1=%b w2=%b w4=%b", x, w1, w2, w4);
      end
      checks++;
      if (w4 != (x == 4'hF)) failures++;
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
