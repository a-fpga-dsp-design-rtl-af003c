// u2s_conv: offset-binary to two's complement converter
// ("convertingsignforsig").
//
// The ADC delivers unsigned samples with 0 V at mid-scale (0x800). The signed
// value is the sample minus 2^(W-1): 0x000 -> -2048, 0x800 -> 0, 0xFFF -> 2047.
// Purely combinational. Follows the original design.
module u2s_conv #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0]        u_i,
  output logic signed [W-1:0] s_o
);

  always_comb s_o = signed'(u_i - W'(2**(W-1)));

endmodule
