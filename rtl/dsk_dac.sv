// dsk_dac: DAC module ("dskdac") driving both channels of the AD9765.
//
// Channel 1 carries the low transient pulse from ltp_gen, updated at the
// 62.5 MHz master clock, which also serves as the DAC1 clock and write
// strobe. Channel 2 carries the value the DSP writes to WRDAC2 (the moving
// average of the envelope): the asynchronous EMIF write (csdac2_n and xwe_n
// both low, several hundred ns long) is sampled on the 62.5 MHz clock into a
// holding register, which is copied to the DAC2 output register on tick_i,
// shortly after the falling edge of the 1 MHz clock. The 1 MHz clock is the
// DAC2 clock and write strobe, so DAC2 latches a value that has been stable
// for half a period.
//
// The split into an LTP channel at 62.5 MHz and a DSP channel at 1 MHz follows
// the original design; the write capture and the clock/strobe wiring are this
// design's choices. Reset sets both channels to mid-scale.
module dsk_dac
  import fd_pkg::*;
(
  input  logic              clk,        // 62.5 MHz
  input  logic              clk_1m,     // divided clock
  input  logic              tick_i,     // one clk cycle after clk_1m falls
  input  logic              rst,
  input  logic              csdac2_n_i,
  input  logic              xwe_n_i,
  input  logic [DATA_W-1:0] from_dsp_i,
  output logic [DATA_W-1:0] dac1_o,
  output logic              dac1_clk_o,
  output logic              dac1_wrt_o,
  output logic [DATA_W-1:0] dac2_o,
  output logic              dac2_clk_o,
  output logic              dac2_wrt_o,
  output logic              ltp_start_o
);

  logic [DATA_W-1:0] dac2_hold;

  ltp_gen u_ltp (
    .clk     (clk),
    .rst     (rst),
    .dac_o   (dac1_o),
    .start_o (ltp_start_o)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      dac2_hold <= MID_SCALE;
      dac2_o    <= MID_SCALE;
    end else begin
      if (!csdac2_n_i && !xwe_n_i) dac2_hold <= from_dsp_i;
      if (tick_i)                  dac2_o    <= dac2_hold;
    end
  end

  always_comb begin
    dac1_clk_o = clk;
    dac1_wrt_o = clk;
    dac2_clk_o = clk_1m;
    dac2_wrt_o = clk_1m;
  end

endmodule
