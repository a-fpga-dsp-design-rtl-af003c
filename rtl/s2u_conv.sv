// s2u_conv: two's complement to offset-binary converter
// ("convertingtounsigned").
//
// Adds 2^(W-1) so that the signed envelope travels to the DSP in the same
// unsigned, mid-scale-0x800 format as raw ADC samples: -2048 -> 0x000,
// 0 -> 0x800, 2047 -> 0xFFF. Purely combinational. Follows the original design.
module s2u_conv #(
  parameter int unsigned W = 12
) (
  input  logic signed [W-1:0] s_i,
  output logic [W-1:0]        u_o
);

  always_comb u_o = unsigned'(s_i) + W'(2**(W-1));

endmodule
