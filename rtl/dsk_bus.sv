// dsk_bus: EMIF data-bus interface of the FPGA ("dskbus" with "csp").
//
// Read direction: while the DSP reads CSADC (csad_n low) the unsigned
// envelope is placed on data bits 15:4 with bits 3:0 zero, so the DSP divides
// the 16-bit word by 16 to recover the 12-bit value. The output drivers are
// enabled (xd_oe) whenever the decoder's rd_n is low.
// Write direction: the DSP's write data, bits 15:4, are handed to the ADC
// (configuration words CR0/CR1) and the DAC module.
//
// The board's bidirectional data pins are modelled as xd_i / xd_o / xd_oe.
// Purely combinational. The bit placement follows the original design; the
// split of the tri-state bus is this design's choice.
module dsk_bus
  import fd_pkg::*;
(
  input  logic              rd_n_i,
  input  logic              csad_n_i,
  input  logic [DATA_W-1:0] env_u_i,
  input  logic [15:0]       xd_i,
  output logic [15:0]       xd_o,
  output logic              xd_oe,
  output logic [DATA_W-1:0] from_dsp_o
);

  always_comb begin
    xd_oe      = ~rd_n_i;
    xd_o       = csad_n_i ? 16'h0000 : {env_u_i, 4'h0};
    from_dsp_o = xd_i[15:4];
  end

endmodule
