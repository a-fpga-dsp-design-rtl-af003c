// tb_qam_demod: feeds echo-like 150 kHz bursts (plus noise) to the
// demodulator and checks every envelope sample against a reference model of
// the chain (mixer, two filters, squares, halved sum, floor square root,
// one-cycle output register). It also checks the physical result: a steady
// tone of amplitude A gives an envelope of about 0.34*A, silence gives 0,
// and the envelope of a burst peaks near the burst's centre.
module tb_qam_demod;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic signed [11:0] sig_i, env_o;
  qam_demod dut (.clk(clk), .rst(rst), .sig_i(sig_i), .env_o(env_o));
  always #500 clk = ~clk;
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

  localparam real PI = 3.14159265358979;
  iir_state_t st_i, st_q;

  function automatic int env_ref(int x, int k);
    int ii = iir_ref(st_i, int'(fdiv(longint'(x) * sin_ref(k), 5)));
    int qq = iir_ref(st_q, int'(fdiv(longint'(x) * cos_ref(k), 5)));
    int r  = isqrt((longint'(ii) * ii + longint'(qq) * qq) / 2);
    return (r > 2047) ? 2047 : r;
  endfunction

  // one sample: apply x after the rising edge with carrier index k, check
  // the envelope after the next edge
  task automatic sample(input int x, input int k, output int env);
    int e;
    sig_i = 12'(x);
    e = env_ref(x, k);
    @(posedge clk); #1;
    env = int'(env_o);
    check(env == e, $sformatf("k=%0d x=%0d env=%0d expected %0d", k, x, env, e));
  endtask

  initial begin
    automatic int k = 0;
    int env, peak, peak_at;
    real a;
    st_i = '{0, 0}; st_q = '{0, 0};
    sig_i = '0;
    @(posedge clk); #1;
    check(env_o == 0, "reset clears the envelope");
    rst = 1'b0;
    @(posedge clk); #1;            // carrier register now holds entry 0
    // silence
    repeat (40) begin sample(0, k, env); k++; end
    check(env == 0, "silence gives zero envelope");
    // steady tone, amplitude 1500, arbitrary phase
    repeat (300) begin
      sample(int'(1500.0 * $sin(2.0 * PI * 0.15 * real'(k) + 0.7)), k, env); k++;
    end
    check(env > 463 && env < 565, $sformatf("tone 1500 -> envelope %0d (about 514)", env));
    // full-scale tone
    repeat (300) begin
      sample(int'(2047.0 * $sin(2.0 * PI * 0.15 * real'(k) + 2.1)), k, env); k++;
    end
    check(env > 630 && env < 770, $sformatf("tone 2047 -> envelope %0d (about 701)", env));
    // decay
    repeat (100) begin sample(0, k, env); k++; end
    check(env < 5, $sformatf("envelope decays to %0d", env));
    // Hann-windowed burst of 30 samples, centre at 15, with noise
    peak = 0; peak_at = 0;
    for (int n = 0; n < 120; n++) begin
      a = (n < 30) ? 1800.0 * (0.5 - 0.5 * $cos(2.0 * PI * real'(n) / 30.0)) : 0.0;
      sample(int'(a * $sin(2.0 * PI * 0.15 * real'(k))) + int'($urandom_range(40)) - 20, k, env);
      k++;
      if (env > peak) begin peak = env; peak_at = n; end
    end
    check(peak > 250, $sformatf("burst peak %0d", peak));
    check(peak_at >= 15 && peak_at <= 28, $sformatf("burst peak at sample %0d (centre 15 plus filter delay)", peak_at));
    // random input
    repeat (500) begin sample(int'($urandom_range(4095)) - 2048, k, env); k++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
