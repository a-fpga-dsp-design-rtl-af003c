// iir_lpf: 2nd-order Butterworth low-pass ("iirm") of the QAM demodulator.
//
// Removes the 300 kHz mixing product and noise above the 75 kHz cut-off at a
// 1 MHz sample rate. Transfer function (coefficients of the original design):
//
//            0.041253537 * (1 + 2 z^-1 + z^-2)
//   H(z) = ------------------------------------
//               1 - 1.3489 z^-1 + 0.51398 z^-2
//
// Direct form II, one state chain w1 (delayone), w2 (delaytwo):
//   w  = x + 1.3489*w1 - 0.51398*w2          ("interm")
//   y  = w + 2*w1 + w2                        ("temp", "output")
//   out = sat12( gain * y )
// There are no multipliers: every coefficient is a sum of powers of two,
//   1.3489   ~ 1 + 1/4 + 1/16 + 1/32 + 1/256 + 1/1024     (1.34863)
//   0.51398  ~ 1/2 + 1/128 + 1/256 + 1/512 + 1/1024       (0.51465)
//   0.041254 ~ 1/32 + 1/128 + 1/512 + 1/4096              (0.04126)
// The first two are the original design's; the gain decomposition is this
// design's. The DC gain is 0.994.
//
// The state carries FRAC fractional bits in ACC_W-bit registers so that the
// right shifts keep precision; x enters shifted left by FRAC and the result
// is shifted back, saturated to 12 bits. GAIN_LOG2 raises the gain by
// 2^GAIN_LOG2 for weak input signals. Widths, FRAC and GAIN_LOG2 are this
// design's choices.
//
// Timing: y_o is combinational from x_i and the state (no latency); the
// state registers advance on each rising clk (1 MHz). Asynchronous reset
// clears the state.
module iir_lpf
  import fd_pkg::*;
#(
  parameter int unsigned FRAC      = 6,
  parameter int unsigned ACC_W     = 26,
  parameter int unsigned GAIN_LOG2 = 0
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x_i,
  output logic signed [DATA_W-1:0] y_o
);

  localparam int unsigned Y_W = ACC_W + 2;
  localparam logic signed [Y_W-1:0] MAX_OUT = Y_W'(2**(DATA_W-1) - 1);
  localparam logic signed [Y_W-1:0] MIN_OUT = -Y_W'(2**(DATA_W-1));

  logic signed [ACC_W-1:0] w, w1, w2;     // interm, delayone, delaytwo
  logic signed [ACC_W-1:0] x11, x12;      // pole products
  logic signed [Y_W-1:0]   y, g, gs;

  always_comb begin
    // pole terms, shift-and-add
    x11 = w1 + (w1 >>> 2) + (w1 >>> 4) + (w1 >>> 5) + (w1 >>> 8) + (w1 >>> 10);
    x12 = (w2 >>> 1) + (w2 >>> 7) + (w2 >>> 8) + (w2 >>> 9) + (w2 >>> 10);
    w   = (ACC_W'(x_i) <<< FRAC) + x11 - x12;
    // zeros 1, 2, 1
    y   = Y_W'(w) + (Y_W'(w1) <<< 1) + Y_W'(w2);
    // gain
    g   = (y >>> 5) + (y >>> 7) + (y >>> 9) + (y >>> 12);
    gs  = (g <<< GAIN_LOG2) >>> FRAC;
    if (gs > MAX_OUT)      y_o = MAX_OUT[DATA_W-1:0];
    else if (gs < MIN_OUT) y_o = MIN_OUT[DATA_W-1:0];
    else                   y_o = gs[DATA_W-1:0];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      w1 <= '0;
      w2 <= '0;
    end else begin
      w1 <= w;
      w2 <= w1;
    end
  end

endmodule
