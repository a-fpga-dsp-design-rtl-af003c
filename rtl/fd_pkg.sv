// fd_pkg: constants shared by the fracture-detection FPGA front end.
//
// Carrier tables: the quadrature mixer needs one 150 kHz sine and cosine
// sample per 1 MHz ADC sample. 150 kHz / 1 MHz = 3/20, so the sequence repeats
// after 20 samples (three carrier periods). Each entry is
//   SIN_LUT[k] = round(31 * sin(2*pi*0.15*(k+1)))
//   COS_LUT[k] = round(31 * cos(2*pi*0.15*(k+1)))      k = 0..19
// stored as 6-bit two's complement (amplitude +/-31). The sine column is the
// one used by the original design; the cosine column follows the same rule.
//
// EMIF map: the DSP reaches the board through chip-enable space CE2
// (0xA000_0000). Only the low 16 address bits reach the FPGA, and bits 1:0
// are always zero, so the decoder sees XA(15:2).
package fd_pkg;

  localparam int unsigned DATA_W   = 12;   // ADC, DAC and envelope width
  localparam int unsigned LUT_W    = 6;    // carrier table width (sign + 5 bits)
  localparam int unsigned N_LUT    = 20;   // carrier table length

  typedef logic signed [LUT_W-1:0] lut_t;
  typedef lut_t lut_arr_t [N_LUT];

  localparam lut_arr_t SIN_LUT = '{
    6'sd25, 6'sd29, 6'sd10, -6'sd18, -6'sd31, -6'sd18, 6'sd10, 6'sd29, 6'sd25, 6'sd0,
    -6'sd25, -6'sd29, -6'sd10, 6'sd18, 6'sd31, 6'sd18, -6'sd10, -6'sd29, -6'sd25, 6'sd0};

  localparam lut_arr_t COS_LUT = '{
    6'sd18, -6'sd10, -6'sd29, -6'sd25, 6'sd0, 6'sd25, 6'sd29, 6'sd10, -6'sd18, -6'sd31,
    -6'sd18, 6'sd10, 6'sd29, 6'sd25, 6'sd0, -6'sd25, -6'sd29, -6'sd10, 6'sd18, 6'sd31};

  // Low 16 bits of the EMIF byte addresses used by the front end.
  localparam logic [15:0] ADDR_CSADC  = 16'h0000;  // 0xA008_0000: ADC data / ADC config
  localparam logic [15:0] ADDR_WRDAC1 = 16'h0004;  // 0xA008_0004: DAC channel 1
  localparam logic [15:0] ADDR_WRDAC2 = 16'h000C;  // 0xA008_000C: DAC channel 2

  // Mid-scale code of the ADC and DAC (0 V).
  localparam logic [DATA_W-1:0] MID_SCALE = 12'h800;

endpackage
