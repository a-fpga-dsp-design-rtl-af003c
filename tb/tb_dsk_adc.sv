// tb_dsk_adc: the ADC interface must pass the ADC clock, turn the bus around
// for a DSP configuration write (CR0 0x01A, CR1 0x4D2 as used at start-up),
// and capture one sample per 1 MHz rising edge while the ADC owns the bus.
module tb_dsk_adc;
  logic clk_1m = 1'b0, rst = 1'b1;
  logic csad_n_i, xwe_n_i, ad_oe, adrw_o, adclk_o;
  logic [11:0] to_ad_i, ad_i, ad_o, sample_o;
  dsk_adc dut (.*);
  always #500 clk_1m = ~clk_1m;
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

  initial begin
    logic [11:0] held;
    csad_n_i = 1'b1; xwe_n_i = 1'b1; to_ad_i = '0; ad_i = 12'h123;
    @(negedge clk_1m);
    check(sample_o == 12'h800, "reset value mid-scale");
    @(negedge clk_1m) rst = 1'b0;
    // sampling
    for (int k = 0; k < 50; k++) begin
      ad_i = 12'($urandom_range(4095));
      @(posedge clk_1m); #1;
      check(sample_o == ad_i, $sformatf("sample %h exp %h", sample_o, ad_i));
      check(adclk_o == clk_1m && adrw_o && !ad_oe, "read direction");
    end
    // configuration writes: the bus turns around while CSADC and XWE are low
    for (int w = 0; w < 4; w++) begin
      @(negedge clk_1m);
      held = sample_o;
      to_ad_i = (w % 2 == 0) ? 12'h01A : 12'h4D2;
      csad_n_i = 1'b0; #1;
      check(adrw_o && !ad_oe, "select alone does not turn the bus");
      xwe_n_i = 1'b0; #1;
      check(!adrw_o && ad_oe && ad_o == to_ad_i, "write drives the ADC bus");
      ad_i = 12'hABC;               // whatever the ADC pins show now
      @(posedge clk_1m); #1;
      check(sample_o == held, "no capture while the DSP writes");
      xwe_n_i = 1'b1; csad_n_i = 1'b1; #1;
      check(adrw_o && !ad_oe, "bus returned to the ADC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
