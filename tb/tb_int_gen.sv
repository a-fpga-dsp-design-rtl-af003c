// tb_int_gen: the interrupt line at the full sample rate (DECIM = 1) and
// decimated by 4 (DECIM = 4), both driven by the same 60-cycle sample clock.
// Checks, at every 16-unit master tick: each interrupt line is high whenever
// the sample clock is high; each falling edge of a line coincides with a
// falling edge of the sample clock; and consecutive falling edges are
// exactly DECIM sample periods (DECIM x 60 master cycles) apart. The number
// of requests over the run is checked as well.
module tb_int_gen;
  logic clk = 1'b0, clk_1m = 1'b0, rst = 1'b1;
  logic int1_n, int4_n;

  int_gen #(.DECIM(1)) dut1 (.clk_1m(clk_1m), .rst(rst), .int_n_o(int1_n));
  int_gen #(.DECIM(4)) dut4 (.clk_1m(clk_1m), .rst(rst), .int_n_o(int4_n));

  always #8 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc % 30 == 0) clk_1m <= ~clk_1m;   // 60-cycle sample clock
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic p1 = 1'b1, p4 = 1'b1, pc = 1'b0;
    automatic int last1 = -1, last4 = -1, n1 = 0, n4 = 0;
    #20 rst = 1'b0;
    @(negedge clk);
    p1 = int1_n; p4 = int4_n; pc = clk_1m;
    repeat (60 * 200) begin
      @(negedge clk);
      if (clk_1m) check(int1_n && int4_n, "interrupt lines high while the sample clock is high");
      if (p1 && !int1_n) begin
        check(pc && !clk_1m, "DECIM=1 request on a falling sample clock edge");
        if (last1 >= 0) check(cyc - last1 == 60, $sformatf("DECIM=1 spacing %0d", cyc - last1));
        last1 = cyc; n1++;
      end
      if (p4 && !int4_n) begin
        check(pc && !clk_1m, "DECIM=4 request on a falling sample clock edge");
        if (last4 >= 0) check(cyc - last4 == 240, $sformatf("DECIM=4 spacing %0d", cyc - last4));
        last4 = cyc; n4++;
      end
      p1 = int1_n; p4 = int4_n; pc = clk_1m;
    end
    $display("requests: DECIM=1 %0d, DECIM=4 %0d", n1, n4);
    check(n1 >= 199 && n1 <= 200, $sformatf("%0d requests at the full rate", n1));
    check(n4 >= 49 && n4 <= 50, $sformatf("%0d requests decimated by 4", n4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
