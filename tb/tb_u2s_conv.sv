// tb_u2s_conv: every 12-bit code; signed value = code - 2048.
module tb_u2s_conv;
  logic [11:0] u_i;
  logic signed [11:0] s_o;
  u2s_conv dut (.u_i(u_i), .s_o(s_o));
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
    for (int u = 0; u < 4096; u++) begin
      u_i = 12'(u); #1;
      check(int'(s_o) == u - 2048, $sformatf("%0d -> %0d", u, s_o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
