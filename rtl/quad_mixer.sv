// quad_mixer: quadrature down-mixer ("quadoutput") of the QAM demodulator.
//
// The signed 12-bit ADC sample is multiplied by the registered sine and
// cosine carrier samples of sincos_gen (6-bit, amplitude 31). Each product
// is 18 bits signed; its bits [16:5], i.e. the product divided by 32, form
// the 12-bit in-phase and quadrature values that feed the two low-pass
// filters. The division undoes the table amplitude, so a full-scale input
// stays within 12 bits (|x*31/32| < 2048).
//
// Timing: the carrier samples change on the rising clock edge; the products
// are combinational from the carrier registers and sig_i, and are taken by
// the filter registers on the next edge.
//
// The 12 x 6 -> 18-bit product follows the original design; taking bits
// [16:5] for the 12-bit filter input is this design's choice.
module quad_mixer
  import fd_pkg::*;
#(
  parameter int unsigned SCALE_SHIFT = 5
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] sig_i,
  output logic signed [DATA_W-1:0] i_o,
  output logic signed [DATA_W-1:0] q_o
);

  localparam int unsigned PROD_W = DATA_W + LUT_W;   // 18

  lut_t sin_s, cos_s;
  logic signed [PROD_W-1:0] prod_i, prod_q;

  sincos_gen u_carrier (
    .clk   (clk),
    .rst   (rst),
    .sin_o (sin_s),
    .cos_o (cos_s)
  );

  always_comb begin
    prod_i = PROD_W'(sig_i) * PROD_W'(sin_s);
    prod_q = PROD_W'(sig_i) * PROD_W'(cos_s);
    i_o    = prod_i[SCALE_SHIFT +: DATA_W];
    q_o    = prod_q[SCALE_SHIFT +: DATA_W];
  end

endmodule
