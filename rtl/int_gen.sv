// int_gen: DSP interrupt line, one request per DECIM envelope samples.
//
// The DSP takes its hardware interrupt on a falling edge of int_n_o and then
// reads the newest envelope. With DECIM = 1 the line is the 1 MHz sample
// clock itself, so the DSP reads every sample (one request per ~1 us). With
// DECIM > 1 the low half of the sample clock is let through only once every
// DECIM periods, so the DSP reads every DECIM-th envelope sample: a
// decimation of the envelope. The envelope is already low-pass filtered
// well below the carrier, so no further filter is needed before it.
//
// A modulo-DECIM counter advances on each rising edge of clk_1m and
// int_n_o = clk_1m | (cnt != 0). The counter changes only while clk_1m is
// high, when int_n_o is high whatever its value, so the line has no glitch;
// its falling edges are a subset of the falling edges of clk_1m.
//
// Driving the interrupt from the sample clock and the 1-sample rate
// (DECIM = 1) follow the original design, which also points out that a
// decimation by 4 (one interrupt per 4 us) keeps the envelope's precision
// and leaves the DSP four times longer per interrupt. The counter that
// implements it and its reset value (0) are this design's choices.
module int_gen #(
  parameter int unsigned DECIM = 1
) (
  input  logic clk_1m,
  input  logic rst,        // asynchronous, active high
  output logic int_n_o
);

  localparam int unsigned CNT_W = (DECIM > 1) ? $clog2(DECIM) : 1;

  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk_1m or posedge rst) begin
    if (rst)                            cnt <= '0;
    else if (cnt == CNT_W'(DECIM - 1))  cnt <= '0;
    else                                cnt <= cnt + 1'b1;
  end

  always_comb int_n_o = clk_1m | (cnt != '0);

endmodule
