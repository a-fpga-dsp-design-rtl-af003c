// qam_demod: QAM envelope demodulator ("demo") of the ultrasonic receiver.
//
// The received 150 kHz burst, sampled at 1 MHz, is mixed down with a sine and
// a cosine carrier (quad_mixer), each branch is low-pass filtered at 75 kHz
// (iir_lpf), squared (squarer), the two powers are added and halved
// (iq_adder) and the square root (sqrt_restoring) gives the envelope:
//
//   env = sqrt( (I^2 + Q^2) / 2 )
//
// For an input tone of amplitude A at the carrier frequency, I^2 + Q^2 is
// about (A*31/64)^2, so env is about 0.34*A (times 2^GAIN_LOG2). The ripple
// at twice the carrier (300 kHz) is attenuated by the filters.
//
// The envelope is 0..2047 (the rare root of 2048 is clamped) and is held in
// an output register that updates on each rising edge of the 1 MHz clock.
// Latency: a step at sig_i reaches env_o on the next rising edge, filtered
// by the IIR response. The chain and the widths follow the original design;
// the output register and the clamp are this design's choices.
module qam_demod
  import fd_pkg::*;
#(
  parameter int unsigned GAIN_LOG2 = 0
) (
  input  logic                     clk,      // 1 MHz sample clock
  input  logic                     rst,      // asynchronous, active high
  input  logic signed [DATA_W-1:0] sig_i,
  output logic signed [DATA_W-1:0] env_o
);

  localparam int unsigned SQ_W = 2 * DATA_W;   // 24

  logic signed [DATA_W-1:0] mix_i, mix_q, filt_i, filt_q;
  logic signed [SQ_W-1:0]   sq_i, sq_q;
  logic        [SQ_W-1:0]   radicand;
  logic        [DATA_W-1:0] root;

  quad_mixer u_mixer (
    .clk   (clk),
    .rst   (rst),
    .sig_i (sig_i),
    .i_o   (mix_i),
    .q_o   (mix_q)
  );

  iir_lpf #(.GAIN_LOG2(GAIN_LOG2)) u_iir_i (
    .clk (clk), .rst (rst), .x_i (mix_i), .y_o (filt_i)
  );

  iir_lpf #(.GAIN_LOG2(GAIN_LOG2)) u_iir_q (
    .clk (clk), .rst (rst), .x_i (mix_q), .y_o (filt_q)
  );

  squarer u_sq_i (.a_i (filt_i), .b_i (filt_i), .c_o (sq_i));
  squarer u_sq_q (.a_i (filt_q), .b_i (filt_q), .c_o (sq_q));

  iq_adder #(.IN_W(SQ_W)) u_add (
    .a_i (SQ_W'(unsigned'(sq_i))),
    .b_i (SQ_W'(unsigned'(sq_q))),
    .c_o (radicand)
  );

  sqrt_restoring #(.N(DATA_W)) u_sqrt (
    .x_i (radicand),
    .q_o (root)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                env_o <= '0;
    else if (root[DATA_W-1]) env_o <= DATA_W'(2**(DATA_W-1) - 1);
    else                    env_o <= signed'(root);
  end

endmodule
