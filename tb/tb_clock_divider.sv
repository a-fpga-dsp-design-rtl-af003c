// tb_clock_divider: the divided clock must have a period of 60 master cycles
// (62.5 MHz -> 1.042 MHz) with 30 high and 30 low, and tick_o must be high
// for exactly one master cycle right after each falling edge.
module tb_clock_divider;
  logic clk = 1'b0, rst = 1'b1;
  logic clk_out, tick_o;
  clock_divider dut (.clk_in(clk), .rst(rst), .clk_out(clk_out), .tick_o(tick_o));
  always #8 clk = ~clk;
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
    automatic int cyc = 0, last_rise = -1, last_fall = -1, rises = 0, ticks = 0;
    automatic logic prev = 1'b0;
    repeat (2) @(negedge clk);
    check(clk_out == 1'b0 && tick_o == 1'b0, "reset state");
    rst = 1'b0;
    repeat (1200) begin
      @(negedge clk);
      cyc++;
      if (clk_out && !prev) begin
        if (last_rise >= 0) check(cyc - last_rise == 60, $sformatf("period %0d", cyc - last_rise));
        if (last_fall >= 0) check(cyc - last_fall == 30, $sformatf("low time %0d", cyc - last_fall));
        last_rise = cyc; rises++;
      end
      if (!clk_out && prev) begin
        check(cyc - last_rise == 30, $sformatf("high time %0d", cyc - last_rise));
        last_fall = cyc;
      end
      if (tick_o) begin
        ticks++;
        check(!clk_out && cyc == last_fall, "tick in the first cycle after the falling edge");
      end
      prev = clk_out;
    end
    check(rises == 20, $sformatf("%0d rising edges in 1200 cycles", rises));
    check(ticks == 20, $sformatf("%0d ticks in 1200 cycles", ticks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
