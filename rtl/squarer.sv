// squarer: signed 12 x 12 -> 24-bit multiplier ("muliir").
//
// In the QAM demodulator both operands are tied to one filter output, so the
// block forms I^2 or Q^2. The product of two 12-bit two's complement numbers
// is at most 2^22 in magnitude and always fits the 24-bit output.
// Purely combinational.
module squarer
  import fd_pkg::*;
(
  input  logic signed [DATA_W-1:0]   a_i,
  input  logic signed [DATA_W-1:0]   b_i,
  output logic signed [2*DATA_W-1:0] c_o
);

  always_comb c_o = (2*DATA_W)'(a_i) * (2*DATA_W)'(b_i);

endmodule
