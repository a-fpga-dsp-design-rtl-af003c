// tb_iq_adder: random and extreme pairs of squares; the output must be the
// top 24 bits of the exact 25-bit sum.
module tb_iq_adder;
  logic [23:0] a_i, b_i, c_o;
  iq_adder dut (.a_i(a_i), .b_i(b_i), .c_o(c_o));
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
    longint a, b;
    for (int k = 0; k < 3000; k++) begin
      case (k)
        0: begin a = 64'hFFFFFF; b = 64'hFFFFFF; end
        1: begin a = 0; b = 1; end
        2: begin a = 4194304; b = 4194304; end
        default: begin a = longint'($urandom_range(32'hFFFFFF)); b = longint'($urandom_range(32'hFFFFFF)); end
      endcase
      a_i = 24'(a); b_i = 24'(b); #1;
      check(longint'(c_o) == (a + b) / 2, $sformatf("%0d+%0d -> %0d", a, b, c_o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
