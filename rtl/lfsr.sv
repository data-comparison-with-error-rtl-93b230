// lfsr: Fibonacci linear feedback shift register with XOR feedback.
//
// Each enabled clock the register shifts left by one and the XOR of the
// tapped bits enters at bit 0. With a primitive feedback polynomial the
// register steps through all 2^WIDTH - 1 non-zero states before repeating;
// the all-zero state is never reached from a non-zero seed. TAPS has a 1 at
// bit i when stage i feeds the XOR; the default 8'hB8 is x^8+x^6+x^5+x^4+1.
// XOR feedback follows the generator this design is built on; the polynomials
// and seeds are this design's choices.
// Timing: state updates on the rising clock edge when en is high; rst_n is an
// active-low synchronous reset that loads SEED (which must be non-zero).
module lfsr #(
  parameter int unsigned     WIDTH = 8,
  parameter logic [WIDTH-1:0] TAPS = 8'hB8,
  parameter logic [WIDTH-1:0] SEED = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] state
);
  logic feedback;
  always_comb feedback = ^(state & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n)   state <= SEED;
    else if (en)  state <= {state[WIDTH-2:0], feedback};
  end

  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) state != '0);
endmodule
