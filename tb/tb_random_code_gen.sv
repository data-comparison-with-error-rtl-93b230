// tb_random_code_gen: checks the generator's two sequences. After reset the
// outputs equal the seeds; with enable high the codeword runs through 255
// distinct non-zero values and the tag through 15, each register shifting
// left by one bit per step; with enable low both hold.
module tb_random_code_gen;
  import ecc_cmp_pkg::*;
  logic       clk;
  logic       rst_n = 1'b0;
  logic       enable = 1'b0;
  codeword_t  codeword;
  logic [3:0] tag;
  int checks = 0, failures = 0;
  int distinct_cw = 0, distinct_tag = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  random_code_gen dut (.clk(clk), .rst_n(rst_n), .enable(enable), .codeword(codeword), .tag(tag));

  initial begin
    bit seen_cw [256];
    bit seen_tag [16];
    logic [7:0] pc;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (codeword != 8'h5A || tag != 4'h1) begin failures++; $display("FAIL seeds %h %h", codeword, tag); end
    rst_n = 1'b1;
    enable = 1'b1;
    for (int i = 0; i < 255; i++) begin
      if (!seen_cw[codeword])  begin seen_cw[codeword] = 1'b1; distinct_cw++; end
      if (!seen_tag[tag])      begin seen_tag[tag] = 1'b1; distinct_tag++; end
      pc = codeword;
      @(posedge clk); #1;
      checks++;
      if (codeword[7:1] != pc[6:0]) begin failures++; $display("FAIL shift %h -> %h", pc, codeword); end
    end
    checks += 3;
    if (distinct_cw != 255)  begin failures++; $display("FAIL distinct codewords %0d", distinct_cw); end
    if (distinct_tag != 15)  begin failures++; $display("FAIL distinct tags %0d", distinct_tag); end
    if (codeword != 8'h5A || tag != 4'h1) begin failures++; $display("FAIL period"); end
    enable = 1'b0;
    pc = codeword;
    repeat (4) @(posedge clk); #1;
    checks++;
    if (codeword != pc) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
