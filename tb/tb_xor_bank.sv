// tb_xor_bank: random-vector check of the XOR bank at the default width and
// at a wider one; each output bit is compared with the inequality of the two
// input bits.
module tb_xor_bank;
  logic [3:0]  a4, b4, d4;
  logic [11:0] a12, b12, d12;
  int checks = 0, failures = 0;

  xor_bank             dut4  (.a(a4),  .b(b4),  .diff(d4));
  xor_bank #(.WIDTH(12)) dut12 (.a(a12), .b(b12), .diff(d12));

  initial begin
    for (int n = 0; n < 200; n++) begin
      a4 = 4'($urandom); b4 = 4'($urandom);
      a12 = 12'($urandom); b12 = 12'($urandom);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (d4[i] != (a4[i] != b4[i])) failures++;
      end
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (d12[i] != (a12[i] != b12[i])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
