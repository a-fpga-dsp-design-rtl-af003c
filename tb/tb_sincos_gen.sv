// tb_sincos_gen: checks the 20-entry carrier tables of sincos_gen against the
// carrier formula, the reset value (0) and the 20-clock repetition.
module tb_sincos_gen;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [5:0] sin_o, cos_o;
  int checks = 0, failures = 0;

  sincos_gen dut (.clk(clk), .rst(rst), .sin_o(sin_o), .cos_o(cos_o));

  always #500 clk = ~clk;

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
    repeat (3) @(negedge clk);
    check(sin_o == 0 && cos_o == 0, "outputs cleared by reset");
    rst = 1'b0;
    for (int k = 0; k < 65; k++) begin
      @(negedge clk);
      check(int'(sin_o) == sin_ref(k), $sformatf("sin[%0d]=%0d exp %0d", k, sin_o, sin_ref(k)));
      check(int'(cos_o) == cos_ref(k), $sformatf("cos[%0d]=%0d exp %0d", k, cos_o, cos_ref(k)));
    end
    // asynchronous reset in mid-cycle
    #100 rst = 1'b1;
    #10 check(sin_o == 0 && cos_o == 0, "asynchronous reset");
    @(negedge clk) rst = 1'b0;
    @(negedge clk);
    check(sin_o == 25 && cos_o == 18, "first entry after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
