// tb_ham84_encoder: checks the (8,4) encoder against a generator-matrix
// reference and checks the code properties the comparator relies on: every
// codeword has even weight and any two codewords differ in at least 4 bits.
module tb_ham84_encoder;
  import tb_ecc_ref_pkg::*;
  logic [3:0] tag, parity;
  logic [7:0] cw [16];
  int checks = 0, failures = 0;

  ham84_encoder dut (.tag(tag), .parity(parity));

  initial begin
    for (int t = 0; t < 16; t++) begin
      tag = 4'(t);
      #1;
      cw[t] = {tag, parity};
      checks++;
      if (parity != ref_parity(tag)) begin
        failures++;
        $display("FAIL tag=%h parity=%h expected %h", tag, parity, ref_parity(tag));
      end
      checks++;
      if ($countones(cw[t]) % 2 != 0) begin
        failures++;
        $display("FAIL codeword %h has odd weight", cw[t]);
      end
    end
    for (int i = 0; i < 16; i++)
      for (int j = i + 1; j < 16; j++) begin
        checks++;
        if ($countones(cw[i] ^ cw[j]) < 4) begin
          failures++;
          $display("FAIL distance(%h,%h) < 4", cw[i], cw[j]);
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
