// tb_squarer: every 12-bit value squared, plus random signed pairs.
module tb_squarer;
  logic signed [11:0] a_i, b_i;
  logic signed [23:0] c_o;
  squarer dut (.a_i(a_i), .b_i(b_i), .c_o(c_o));
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
    for (int a = -2048; a < 2048; a++) begin
      a_i = 12'(a); b_i = 12'(a); #1;
      check(int'(c_o) == a * a, $sformatf("%0d^2 = %0d", a, c_o));
    end
    for (int k = 0; k < 2000; k++) begin
      automatic int a = int'($urandom_range(4095)) - 2048, b = int'($urandom_range(4095)) - 2048;
      a_i = 12'(a); b_i = 12'(b); #1;
      check(int'(c_o) == a * b, $sformatf("%0d*%0d = %0d", a, b, c_o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
