// ltp_gen: low transient pulse (LTP) drive-signal generator.
//
// An LTP is a rectangular pulse convolved with two impulses of amplitude A1
// and A2 spaced by half a damped period of the transducer, so that the
// transducer's ringing from the first step is cancelled by the second. For a
// pulse as long as the impulse spacing the drive is a two-step staircase:
// level A1, then level A2, then rest.
//
// A free-running CNT_W-bit counter at 62.5 MHz (16 ns steps) indexes the
// waveform; comparators against T1 and T2 select the 12-bit DAC code:
//   cnt <= T1       : LEVEL1
//   T1 < cnt <= T2  : LEVEL2
//   otherwise       : IDLE
// The counter wraps, so the pulse repeats every 2^CNT_W cycles (4.19 ms at
// the default 18 bits), long enough for all echoes of one shot to die out.
// dac_o is registered; start_o is high in the cycle dac_o first shows LEVEL1.
//
// T1 = 264, LEVEL1 = 2000 and LEVEL2 = 1231 follow the original design. T2
// (equal step lengths), IDLE (mid-scale) and CNT_W are this design's choices.
// Reset: counter 0, dac_o = IDLE, asynchronous.
module ltp_gen
  import fd_pkg::*;
#(
  parameter int unsigned T1     = 264,
  parameter int unsigned T2     = 528,
  parameter int unsigned LEVEL1 = 2000,
  parameter int unsigned LEVEL2 = 1231,
  parameter int unsigned IDLE   = 2048,
  parameter int unsigned CNT_W  = 18
) (
  input  logic              clk,
  input  logic              rst,
  output logic [DATA_W-1:0] dac_o,
  output logic              start_o
);

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt     <= '0;
      dac_o   <= DATA_W'(IDLE);
      start_o <= 1'b0;
    end else begin
      cnt     <= cnt + 1'b1;
      start_o <= (cnt == '0);
      if (cnt <= CNT_W'(T1))      dac_o <= DATA_W'(LEVEL1);
      else if (cnt <= CNT_W'(T2)) dac_o <= DATA_W'(LEVEL2);
      else                        dac_o <= DATA_W'(IDLE);
    end
  end

endmodule
