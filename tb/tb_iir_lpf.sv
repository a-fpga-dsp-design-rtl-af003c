// tb_iir_lpf: checks iir_lpf sample by sample against a reference model of the
// filter equations, then checks the frequency response that matters for the
// demodulator: unity DC gain, pass band at 20 kHz, strong attenuation at the
// 300 kHz mixing product.
module tb_iir_lpf;
  import tb_ref_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [11:0] x_i, y_o;
  int checks = 0, failures = 0;
  iir_state_t st;

  iir_lpf dut (.clk(clk), .rst(rst), .x_i(x_i), .y_o(y_o));

  always #500 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply one sample, compare with the model, return the output
  task automatic step(input int x, output int y);
    int e;
    x_i = 12'(x);
    #1;
    e = iir_ref(st, x);
    y = int'(y_o);
    check(y == e, $sformatf("x=%0d y=%0d expected %0d", x, y, e));
    @(posedge clk);
    #1;
  endtask

  task automatic tone(input real f, input real amp, input int n, output int peak);
    int y;
    peak = 0;
    for (int k = 0; k < n; k++) begin
      step(int'(amp * $sin(2.0 * 3.14159265358979 * f * real'(k) / 1.0e6)), y);
      if (k > n / 2 && (y > peak || -y > peak)) peak = (y < 0) ? -y : y;
    end
  endtask

  initial begin
    int y, peak;
    st = '{0, 0};
    x_i = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(posedge clk); #1;
    // DC step
    for (int k = 0; k < 200; k++) step(1000, y);
    check(y >= 990 && y <= 998, $sformatf("DC gain: 1000 -> %0d", y));
    // negative full scale, saturation must not wrap
    for (int k = 0; k < 200; k++) step(-2048, y);
    check(y <= -2030, $sformatf("negative DC: -2048 -> %0d", y));
    // random samples
    for (int k = 0; k < 500; k++) step(int'($urandom_range(4095)) - 2048, y);
    // frequency response
    tone(20.0e3, 1000.0, 400, peak);
    check(peak > 900 && peak < 1150, $sformatf("20 kHz pass band peak %0d", peak));
    tone(300.0e3, 1000.0, 400, peak);
    check(peak < 60, $sformatf("300 kHz stop band peak %0d", peak));
    // reset clears the state
    rst = 1'b1; #1; rst = 1'b0;
    st = '{0, 0};
    step(0, y);
    check(y == 0, "reset clears state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
