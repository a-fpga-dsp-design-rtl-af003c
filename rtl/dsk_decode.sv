// dsk_decode: EMIF address decoder between the DSP and the FPGA ("dskdecode").
//
// The DSP reaches the FPGA through EMIFA chip-enable space CE2. The FPGA sees
// address lines XA(15:2) (bits 1:0 of a word address are always zero). All
// outputs are active-low selects and purely combinational:
//
//   rd_n_o     = XA15 | XA14 | XA13 | CE | RE   FPGA drives the data bus
//   csad_n_o   = XA(15:2) all 0 and CE            CSADC  (offset 0x0000)
//   csdac1_n_o = XA(15:3) all 0, XA2 = 1, CE      WRDAC1 (offset 0x0004)
//   csdac2_n_o = XA(15:4) all 0, XA3 = XA2 = 1, CE  WRDAC2 (offset 0x000C)
//
// The three selects follow the original OR-gate decoders. The original
// forms rd_n from the write enable; here the read strobe is used so that the
// FPGA drives the shared bus only while the DSP reads.
module dsk_decode
  import fd_pkg::*;
(
  input  logic [15:2] xa_i,
  input  logic        xce_n_i,
  input  logic        xre_n_i,
  output logic        rd_n_o,
  output logic        csad_n_o,
  output logic        csdac1_n_o,
  output logic        csdac2_n_o
);

  always_comb begin
    rd_n_o     = xa_i[15] | xa_i[14] | xa_i[13] | xce_n_i | xre_n_i;
    // an address matches when no bit differs from the map entry (the
    // OR-of-differences form of the original gate decoders)
    csad_n_o   = (|(xa_i ^ ADDR_CSADC[15:2]))  | xce_n_i;
    csdac1_n_o = (|(xa_i ^ ADDR_WRDAC1[15:2])) | xce_n_i;
    csdac2_n_o = (|(xa_i ^ ADDR_WRDAC2[15:2])) | xce_n_i;
  end

endmodule
