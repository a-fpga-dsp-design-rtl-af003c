// fpga_top: FPGA front end of an ultrasonic fracture/edge detector.
//
// The FPGA sits between a DSP and the analog parts of the board. It
//   * drives the transmitting transducer through DAC1 with a low transient
//     pulse (ltp_gen inside dsk_dac), clocked at the 62.5 MHz master clock
//     that the DSP's timer supplies;
//   * divides that clock to ~1 MHz (clock_divider) for the ADC, the
//     demodulator and DAC2;
//   * takes each 12-bit ADC sample of the receiving transducer (dsk_adc),
//     converts it to signed (u2s_conv), extracts the envelope of the 150 kHz
//     echo signal (qam_demod) and converts it back to offset binary
//     (s2u_conv);
//   * presents the envelope to the DSP over the EMIF (dsk_decode, dsk_bus) and
//     interrupts the DSP on int_n_o (int_gen): once per sample by default,
//     or once per INT_DECIM samples to decimate the envelope;
//   * passes the DSP's configuration words to the ADC and its filtered
//     result to DAC2 (dsk_dac).
// The DSP locates the echo maxima in the envelope; their times give the
// distances to the plate edges.
//
// EMIF offsets (CE2 space 0xA008_xxxx): 0x0 CSADC read = envelope on data bits
// 15:4, write = ADC configuration; 0x4 WRDAC1; 0xC WRDAC2 (data bits 15:4).
//
// Clocks: clk_62m5 (master) and clk_1m, generated by the divider. The
// envelope register updates on the rising edge of clk_1m; int_n_o is low
// only in the low half of clk_1m, so its falling edge (the interrupt) comes
// half a sample period after an update, when the envelope is stable. rst_n is asynchronous, active low.
// Tri-state pads are split into _i / _o / _oe triples. The block partition
// follows the original design; csdac1_n_o has no user inside and is brought
// out.
module fpga_top
  import fd_pkg::*;
#(
  parameter int unsigned INT_DECIM = 1   // envelope samples per DSP interrupt
) (
  input  logic              clk_62m5,
  input  logic              rst_n,
  // DSP EMIF
  input  logic [15:2]       xa_i,
  input  logic              xce_n_i,
  input  logic              xre_n_i,
  input  logic              xwe_n_i,
  input  logic [15:0]       xd_i,
  output logic [15:0]       xd_o,
  output logic              xd_oe,
  output logic              int_n_o,
  // THS1206 ADC
  input  logic [DATA_W-1:0] ad_i,
  output logic [DATA_W-1:0] ad_o,
  output logic              ad_oe,
  output logic              adclk_o,
  output logic              adrw_o,
  // AD9765 DAC
  output logic [DATA_W-1:0] dac1_o,
  output logic              dac1_clk_o,
  output logic              dac1_wrt_o,
  output logic [DATA_W-1:0] dac2_o,
  output logic              dac2_clk_o,
  output logic              dac2_wrt_o,
  // status
  output logic              csdac1_n_o,
  output logic              ltp_start_o
);

  logic rst;
  logic clk_1m, tick;
  logic rd_n, csad_n, csdac2_n;
  logic [DATA_W-1:0]        sample_u, env_u, from_dsp;
  logic signed [DATA_W-1:0] sample_s, env_s;

  always_comb rst = ~rst_n;

  clock_divider u_clkdiv (
    .clk_in  (clk_62m5),
    .rst     (rst),
    .clk_out (clk_1m),
    .tick_o  (tick)
  );

  dsk_decode u_decode (
    .xa_i       (xa_i),
    .xce_n_i    (xce_n_i),
    .xre_n_i    (xre_n_i),
    .rd_n_o     (rd_n),
    .csad_n_o   (csad_n),
    .csdac1_n_o (csdac1_n_o),
    .csdac2_n_o (csdac2_n)
  );

  dsk_bus u_bus (
    .rd_n_i     (rd_n),
    .csad_n_i   (csad_n),
    .env_u_i    (env_u),
    .xd_i       (xd_i),
    .xd_o       (xd_o),
    .xd_oe      (xd_oe),
    .from_dsp_o (from_dsp)
  );

  dsk_adc u_adc (
    .clk_1m   (clk_1m),
    .rst      (rst),
    .csad_n_i (csad_n),
    .xwe_n_i  (xwe_n_i),
    .to_ad_i  (from_dsp),
    .ad_i     (ad_i),
    .ad_o     (ad_o),
    .ad_oe    (ad_oe),
    .adrw_o   (adrw_o),
    .adclk_o  (adclk_o),
    .sample_o (sample_u)
  );

  u2s_conv #(.W(DATA_W)) u_u2s (.u_i (sample_u), .s_o (sample_s));

  qam_demod u_qam (
    .clk   (clk_1m),
    .rst   (rst),
    .sig_i (sample_s),
    .env_o (env_s)
  );

  s2u_conv #(.W(DATA_W)) u_s2u (.s_i (env_s), .u_o (env_u));

  dsk_dac u_dac (
    .clk         (clk_62m5),
    .clk_1m      (clk_1m),
    .tick_i      (tick),
    .rst         (rst),
    .csdac2_n_i  (csdac2_n),
    .xwe_n_i     (xwe_n_i),
    .from_dsp_i  (from_dsp),
    .dac1_o      (dac1_o),
    .dac1_clk_o  (dac1_clk_o),
    .dac1_wrt_o  (dac1_wrt_o),
    .dac2_o      (dac2_o),
    .dac2_clk_o  (dac2_clk_o),
    .dac2_wrt_o  (dac2_wrt_o),
    .ltp_start_o (ltp_start_o)
  );

  int_gen #(.DECIM(INT_DECIM)) u_int (
    .clk_1m  (clk_1m),
    .rst     (rst),
    .int_n_o (int_n_o)
  );

endmodule
