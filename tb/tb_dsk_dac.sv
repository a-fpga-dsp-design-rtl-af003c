// tb_dsk_dac: DAC1 must carry the low transient pulse on the 62.5 MHz clock;
// an EMIF write to WRDAC2 must reach DAC2 at the first tick after the write
// (shortly after the 1 MHz clock falls) and be stable at the next rising
// edge of the DAC2 clock; writes without the select must be ignored.
module tb_dsk_dac;
  logic clk = 1'b0, rst = 1'b1, clk_1m, tick;
  logic csdac2_n_i, xwe_n_i, dac1_clk_o, dac1_wrt_o, dac2_clk_o, dac2_wrt_o, ltp_start_o;
  logic [11:0] from_dsp_i, dac1_o, dac2_o;
  clock_divider u_div (.clk_in(clk), .rst(rst), .clk_out(clk_1m), .tick_o(tick));
  dsk_dac dut (.clk(clk), .clk_1m(clk_1m), .tick_i(tick), .rst(rst), .csdac2_n_i(csdac2_n_i),
               .xwe_n_i(xwe_n_i), .from_dsp_i(from_dsp_i), .dac1_o(dac1_o), .dac1_clk_o(dac1_clk_o),
               .dac1_wrt_o(dac1_wrt_o), .dac2_o(dac2_o), .dac2_clk_o(dac2_clk_o),
               .dac2_wrt_o(dac2_wrt_o), .ltp_start_o(ltp_start_o));
  always #8 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n1 = 0, n2 = 0;
  always @(negedge clk) if (!rst) begin
    if (dac1_o == 12'd2000) n1++;
    if (dac1_o == 12'd1231) n2++;
  end

  // EMIF write of 28 master cycles (about 450 ns)
  task automatic emif_write(input logic [11:0] d, input bit sel);
    @(negedge clk);
    from_dsp_i = d; csdac2_n_i = !sel; xwe_n_i = 1'b0;
    repeat (28) @(negedge clk);
    csdac2_n_i = 1'b1; xwe_n_i = 1'b1; from_dsp_i = 12'h5A5;
  endtask

  initial begin
    logic [11:0] prev_val;
    csdac2_n_i = 1'b1; xwe_n_i = 1'b1; from_dsp_i = '0;
    @(negedge clk);
    check(dac2_o == 12'h800 && dac1_o == 12'h800, "mid-scale after reset");
    rst = 1'b0;
    for (int w = 0; w < 8; w++) begin
      automatic logic [11:0] d = 12'($urandom_range(4095));
      prev_val = dac2_o;
      emif_write(d, (w != 3));
      if (w == 3) begin
        repeat (70) @(negedge clk);
        check(dac2_o == prev_val, "write without WRDAC2 select ignored");
      end else begin
        check(dac2_o == prev_val || dac2_o == d, "no other value during the write");
        @(posedge tick); @(negedge clk); @(negedge clk);
        check(dac2_o == d, $sformatf("DAC2 %h expected %h", dac2_o, d));
        @(posedge clk_1m); #1;
        check(dac2_o == d && dac2_clk_o && dac2_wrt_o, "stable at the DAC2 clock edge");
      end
    end
    @(negedge clk);
    check(dac1_clk_o == clk && dac1_wrt_o == clk, "DAC1 clock is the master clock");
    check(n1 == 265 && n2 == 264, $sformatf("LTP steps %0d/%0d cycles", n1, n2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
