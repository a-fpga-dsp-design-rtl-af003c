// sqrt_stage: one step ("onemod") of the restoring square rooter.
//
// Step STAGE (1..N) of a 2N-bit restoring square root. With Q the root bits
// found so far (STAGE-1 of them, right-aligned in q_i), the step forms
//   P = (4*Q + 1) * 2^(2*(N-STAGE))
// i.e. Q followed by the bits "01" and 2*(N-STAGE) zeros, and subtracts it
// from the running remainder. If the difference is non-negative it becomes
// the new remainder and the new root bit is 1; otherwise a multiplexer
// restores the old remainder and the root bit is 0 (the complemented sign of
// the difference). q_o = 2*Q + root bit. Purely combinational.
module sqrt_stage #(
  parameter int unsigned N     = 12,
  parameter int unsigned STAGE = 1
) (
  input  logic [2*N-1:0] r_i,
  input  logic [N-1:0]   q_i,
  output logic [2*N-1:0] r_o,
  output logic [N-1:0]   q_o
);

  localparam int unsigned SH = 2 * (N - STAGE);

  logic [2*N:0] p, d;
  logic         qbit;

  always_comb begin
    p    = (((2*N+1)'(q_i) << 2) | (2*N+1)'(1)) << SH;
    d    = {1'b0, r_i} - p;
    qbit = ~d[2*N];
    r_o  = qbit ? d[2*N-1:0] : r_i;
    q_o  = {q_i[N-2:0], qbit};
  end

endmodule
