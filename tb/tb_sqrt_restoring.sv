// tb_sqrt_restoring: floor square root of 24-bit radicands: all perfect
// squares and their neighbours, the extremes, and random values.
module tb_sqrt_restoring;
  import tb_ref_pkg::*;
  logic [23:0] x_i;
  logic [11:0] q_o;
  sqrt_restoring dut (.x_i(x_i), .q_o(q_o));
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(longint x);
    x_i = 24'(x); #1;
    check(int'(q_o) == isqrt(x), $sformatf("sqrt(%0d) = %0d, expected %0d", x, q_o, isqrt(x)));
  endtask

  initial begin
    for (longint r = 0; r < 4096; r++) begin
      try(r * r);
      if (r > 0) try(r * r - 1);
    end
    try(64'hFFFFFF);
    try(16);
    for (int k = 0; k < 3000; k++) try(longint'($urandom_range(32'hFFFFFF)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
