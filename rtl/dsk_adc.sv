// dsk_adc: interface to the THS1206 ADC ("dskadc").
//
// The ADC runs from the 1 MHz clock, which this block forwards as adclk_o.
// Its 12-bit data bus is bidirectional:
//   adrw_o = csad_n | xwe_n.
// While adrw_o is low (the DSP is writing to CSADC) the FPGA drives the DSP's
// configuration word to_ad_i onto the ADC bus (ad_oe = 1); this is how the DSP
// loads the ADC control registers CR0/CR1 at start-up. While adrw_o is high
// the ADC drives the bus and the block captures ad_i into sample_o on every
// rising edge of the 1 MHz clock. sample_o is unsigned (0 V = 0x800).
//
// ADRW and the bus turn-around follow the original design; the sample
// register is this design's choice (the original feeds the bus straight into
// the demodulator). Reset clears sample_o to mid-scale.
module dsk_adc
  import fd_pkg::*;
(
  input  logic              clk_1m,
  input  logic              rst,
  input  logic              csad_n_i,
  input  logic              xwe_n_i,
  input  logic [DATA_W-1:0] to_ad_i,
  input  logic [DATA_W-1:0] ad_i,
  output logic [DATA_W-1:0] ad_o,
  output logic              ad_oe,
  output logic              adrw_o,
  output logic              adclk_o,
  output logic [DATA_W-1:0] sample_o
);

  always_comb begin
    adrw_o  = csad_n_i | xwe_n_i;
    ad_oe   = ~adrw_o;
    ad_o    = to_ad_i;
    adclk_o = clk_1m;
  end

  always_ff @(posedge clk_1m or posedge rst) begin
    if (rst)         sample_o <= MID_SCALE;
    else if (adrw_o) sample_o <= ad_i;
  end

endmodule
