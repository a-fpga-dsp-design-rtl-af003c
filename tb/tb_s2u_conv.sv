// tb_s2u_conv: every signed 12-bit value; code = value + 2048.
module tb_s2u_conv;
  logic signed [11:0] s_i;
  logic [11:0] u_o;
  s2u_conv dut (.s_i(s_i), .u_o(u_o));
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

  initial begin
    for (int s = -2048; s < 2048; s++) begin
      s_i = 12'(s); #1;
      check(int'(u_o) == s + 2048, $sformatf("%0d -> %0d", s, u_o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
