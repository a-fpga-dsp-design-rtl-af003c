// tb_ltp_gen: one full repetition of the low transient pulse at the default
// size. Checks the levels and their lengths in 16 ns cycles (265 cycles of
// 2000, 264 of 1231, then mid-scale), the repetition period of 2^18 cycles
// and the start strobe. After the first start strobe every cycle's code is
// also compared with the expected shape at its phase within the period, so
// the order of the levels is checked as well as their lengths.
module tb_ltp_gen;
  logic clk = 1'b0, rst = 1'b1;
  logic [11:0] dac_o;
  logic start_o;
  ltp_gen dut (.clk(clk), .rst(rst), .dac_o(dac_o), .start_o(start_o));
  always #8 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int n1 = 0, n2 = 0, nidle = 0, other = 0, starts = 0;
    automatic int cyc = 0;
    int start_at [$];
    int ph, exp_code;
    @(negedge clk);
    check(dac_o == 12'd2048, "idle level in reset");
    @(negedge clk) rst = 1'b0;
    repeat (2 * 262144 - 10) begin
      @(negedge clk);
      cyc++;
      if (start_o) begin
        starts++; start_at.push_back(cyc);
        check(dac_o == 12'd2000, "start strobe with first LEVEL1 sample");
      end
      if (start_at.size() > 0) begin
        ph = (cyc - start_at[0]) % 262144;
        exp_code = (ph <= 264) ? 2000 : (ph <= 528) ? 1231 : 2048;
        check(int'(dac_o) == exp_code, $sformatf("phase %0d: code %0d, expected %0d", ph, dac_o, exp_code));
      end
      if (cyc <= 262144) begin
        case (dac_o)
          12'd2000: n1++;
          12'd1231: n2++;
          12'd2048: nidle++;
          default:  other++;
        endcase
      end
    end
    check(n1 == 265, $sformatf("LEVEL1 for %0d cycles (%0.2f us)", n1, n1 * 0.016));
    check(n2 == 264, $sformatf("LEVEL2 for %0d cycles", n2));
    check(nidle == 262144 - 529, $sformatf("idle for %0d cycles", nidle));
    check(other == 0, "no other codes");
    check(starts == 2, $sformatf("%0d starts", starts));
    if (start_at.size() == 2)
      check(start_at[1] - start_at[0] == 262144, $sformatf("period %0d", start_at[1] - start_at[0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
