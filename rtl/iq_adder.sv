// iq_adder: sums the in-phase and quadrature power ("adderfriir").
//
// Adds two 24-bit squares (non-negative, at most 2^22 each) into a 25-bit
// sum and outputs its top 24 bits, i.e. (I^2 + Q^2) / 2, which is the
// radicand of the square root. Taking the top 24 bits of a 25-bit sum
// follows the original design. Purely combinational.
module iq_adder #(
  parameter int unsigned IN_W = 24
) (
  input  logic [IN_W-1:0] a_i,
  input  logic [IN_W-1:0] b_i,
  output logic [IN_W-1:0] c_o
);

  logic [IN_W:0] sum;

  always_comb begin
    sum = {1'b0, a_i} + {1'b0, b_i};
    c_o = sum[IN_W:1];
  end

endmodule
