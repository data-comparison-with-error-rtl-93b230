// tb_half_adder: exhaustive check of the half adder (a + b = sum + 2*carry).
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (int'(sum) + 2 * int'(carry) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b sum=%0b carry=%0b", a, b, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
