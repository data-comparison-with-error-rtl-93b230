// tb_or_gate_tree: exhaustive check of the OR gate tree at the default size
// (2 inputs) and at 1, 3 and 5 inputs, which exercise uneven splits.
module tb_or_gate_tree;
  logic [1:0] in2;
  logic [0:0] in1;
  logic [2:0] in3;
  logic [4:0] in5;
  logic any2, any1, any3, any5;
  int checks = 0, failures = 0;

  or_gate_tree          dut2 (.in(in2), .any(any2));
  or_gate_tree #(.N(1)) dut1 (.in(in1), .any(any1));
  or_gate_tree #(.N(3)) dut3 (.in(in3), .any(any3));
  or_gate_tree #(.N(5)) dut5 (.in(in5), .any(any5));

  initial begin
    for (int i = 0; i < 32; i++) begin
      in1 = 1'(i); in2 = 2'(i); in3 = 3'(i); in5 = 5'(i);
      #1;
      checks += 4;
      if (any1 != (in1 != 0)) failures++;
      if (any2 != (in2 != 0)) failures++;
      if (any3 != (in3 != 0)) failures++;
      if (any5 != (in5 != 0)) failures++;
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
