// sincos_gen: 150 kHz quadrature carrier for the QAM demodulator.
//
// A 20-entry circular buffer read once per 1 MHz clock. A pointer counts
// 0..19 and wraps; two multiplexers pick the sine and cosine entries of
// fd_pkg::SIN_LUT / COS_LUT and two output registers hold them, so each
// output changes on the rising clock edge. After reset both outputs are 0
// and the pointer sits on the first entry: the first clock after reset
// presents SIN_LUT[0] = 25 and COS_LUT[0] = 18, and the sequence repeats
// every 20 clocks.
//
// Follows the original design: 20 entries, 6-bit signed values, amplitude
// 31, counter + two muxes + two registers with asynchronous clear. The
// cosine table content is computed with the same rule as the sine table.
module sincos_gen
  import fd_pkg::*;
#(
  parameter int unsigned N_SAMPLES = N_LUT
) (
  input  logic       clk,
  input  logic       rst,      // asynchronous, active high
  output lut_t       sin_o,
  output lut_t       cos_o
);

  localparam int unsigned PTR_W = $clog2(N_SAMPLES);

  logic [PTR_W-1:0] ptr;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      ptr   <= '0;
      sin_o <= '0;
      cos_o <= '0;
    end else begin
      sin_o <= SIN_LUT[ptr];
      cos_o <= COS_LUT[ptr];
      ptr   <= (ptr == PTR_W'(N_SAMPLES - 1)) ? '0 : ptr + 1'b1;
    end
  end

endmodule
