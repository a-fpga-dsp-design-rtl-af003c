// clock_divider: makes the ~1 MHz sample clock from the 62.5 MHz master clock.
//
// A counter runs 0..HALF_DIV-1 on clk_in; at the terminal count it wraps and
// the registered clk_out toggles. clk_out therefore has a period of
// 2*HALF_DIV input cycles (62.5 MHz / 60 = 1.042 MHz) and a 50 % duty cycle.
// tick_o is a one-cycle strobe in the clk_in domain, high in the first clk_in
// cycle after each falling edge of clk_out; logic in the fast domain uses it
// to change data half a period away from the rising edge at which the slow
// domain samples it.
//
// The constant 30 and the 8-bit counter follow the original design; the
// toggling output stage and tick_o are this design's choices.
// Reset: counter 0, clk_out 0, asynchronous.
module clock_divider #(
  parameter int unsigned HALF_DIV = 30,
  parameter int unsigned CNT_W    = 8
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out,
  output logic tick_o
);

  logic [CNT_W-1:0] cnt;
  logic             last;

  always_comb last = (cnt == CNT_W'(HALF_DIV - 1));

  always_ff @(posedge clk_in or posedge rst) begin
    if (rst) begin
      cnt     <= '0;
      clk_out <= 1'b0;
      tick_o  <= 1'b0;
    end else begin
      cnt     <= last ? '0 : cnt + 1'b1;
      clk_out <= last ? ~clk_out : clk_out;
      tick_o  <= last & clk_out;
    end
  end

endmodule
