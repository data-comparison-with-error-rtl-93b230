// tb_lfsr: runs the default 8-bit LFSR and a 4-bit one (x^4+x^3+1) through
// a full period. Each must visit 2^WIDTH - 1 distinct non-zero states and
// return to its seed after exactly that many steps; each step must be a
// left shift; holding en low must freeze the state; reset must load the seed.
module tb_lfsr;
  logic       clk;
  logic       rst_n = 1'b0;
  logic       en = 1'b0;
  logic [7:0] s8;
  logic [3:0] s4;
  int checks = 0, failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  lfsr                                    dut8 (.clk(clk), .rst_n(rst_n), .en(en), .state(s8));
  lfsr #(.WIDTH(4), .TAPS(4'hC), .SEED(4'h9)) dut4 (.clk(clk), .rst_n(rst_n), .en(en), .state(s4));

  initial begin
    bit seen8 [256];
    bit seen4 [16];
    logic [7:0] p8;
    repeat (2) @(posedge clk);
    #1;
    checks += 2;
    if (s8 != 8'h01) begin failures++; $display("FAIL seed8 %h", s8); end
    if (s4 != 4'h9)  begin failures++; $display("FAIL seed4 %h", s4); end
    rst_n = 1'b1;
    @(posedge clk); #1;
    checks += 2;
    if (s8 != 8'h01 || s4 != 4'h9) begin failures++; $display("FAIL moved with en low"); end
    en = 1'b1;
    for (int i = 1; i <= 255; i++) begin
      p8 = s8;
      seen8[s8] = 1'b1;
      if (i <= 15) seen4[s4] = 1'b1;
      @(posedge clk); #1;
      checks++;
      if (s8[7:1] != p8[6:0]) begin failures++; $display("FAIL not a shift %h -> %h", p8, s8); end
      checks++;
      if (s8 == 8'h00) begin failures++; $display("FAIL zero state"); end
      if (i < 255) begin
        checks++;
        if (seen8[s8]) begin failures++; $display("FAIL 8-bit repeat after %0d steps", i); end
      end
      if (i == 15) begin
        checks++;
        if (s4 != 4'h9) begin failures++; $display("FAIL 4-bit period"); end
      end else if (i < 15) begin
        checks++;
        if (seen4[s4] || s4 == 4'h0) begin failures++; $display("FAIL 4-bit repeat after %0d", i); end
      end
    end
    checks++;
    if (s8 != 8'h01) begin failures++; $display("FAIL 8-bit period"); end
    en = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (s8 != 8'h01) begin failures++; $display("FAIL hold"); end
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
