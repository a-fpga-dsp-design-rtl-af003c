// sqrt_restoring: combinational restoring shift-and-subtract square rooter
// ("sqrrt").
//
// Computes q_o = floor(sqrt(x_i)) for a 2N-bit unsigned input (N = 12: 24-bit
// radicand, 12-bit root). The root is built most significant bit first by a
// chain of N-1 sqrt_stage steps, each a subtractor plus a restoring
// multiplexer. The last step needs only the sign of its subtraction (the
// remainder is not wanted), so it is a bare subtractor. This structure,
// eleven steps plus a final subtractor, follows the original design.
// Purely combinational: the result settles within the same 1 MHz cycle.
module sqrt_restoring #(
  parameter int unsigned N = 12
) (
  input  logic [2*N-1:0] x_i,
  output logic [N-1:0]   q_o
);

  logic [2*N-1:0] r [N];
  logic [N-1:0]   q [N];
  logic [2*N:0]   p_last, d_last;

  assign r[0] = x_i;
  assign q[0] = '0;

  for (genvar s = 1; s < N; s++) begin : g_stage
    sqrt_stage #(.N(N), .STAGE(s)) u_stage (
      .r_i (r[s-1]),
      .q_i (q[s-1]),
      .r_o (r[s]),
      .q_o (q[s])
    );
  end

  // final step: P(N) = 4*Q + 1, root bit = complemented sign of R - P(N)
  always_comb begin
    p_last = ((2*N+1)'(q[N-1]) << 2) | (2*N+1)'(1);
    d_last = {1'b0, r[N-1]} - p_last;
    q_o    = {q[N-1][N-2:0], ~d_last[2*N]};
  end

endmodule
