// tb_fpga_top_decim: end-to-end test of the FPGA front end with the DSP
// interrupt decimated by 4 (INT_DECIM = 4, one request per 4 samples); all
// other parameters are at their defaults.
//
// The environment is that of tb_fpga_top: a DSP model on the EMIF and an
// ADC model that replays an echo train of four Hann-windowed 150 kHz bursts
// at 51, 80, 102 and 128 samples after the pulse (the asymmetric transducer
// placement). The DSP model configures the ADC, then on each falling edge of
// the interrupt line reads the envelope, averages the last 4 reads (16 us,
// the window the full-rate software gets from 16 reads) and looks for
// maxima, and writes the average to WRDAC2.
// Checks: interrupts come exactly 4 sample periods (240 master cycles) apart,
// always on a falling edge of the sample clock; every envelope read equals
// the reference model of the demodulator at that sample; each write reaches
// DAC2; four echo maxima are found near their expected times. Every
// mechanism is counted and must occur.
module tb_fpga_top_decim;
  import tb_ref_pkg::*;

  localparam int  N_SHOTS  = 1;
  localparam int  DECIM    = 4;
  localparam int  PERIOD   = 262144;              // LTP repetition, master cycles
  localparam real PI       = 3.14159265358979;
  // echo centres in samples (us) after the LTP start, per shot:
  // [0] asymmetric placement, [1] symmetric placement
  localparam int  ECHO_AT  [2][4] = '{'{51, 80, 102, 128}, '{50, 79, 104, 125}};
  localparam real ECHO_AMP [2][4] = '{'{1600.0, 1200.0, 1000.0, 800.0},
                                      '{1600.0, 1200.0, 1000.0, 1100.0}};

  logic clk = 1'b0, rst_n = 1'b1;
  logic [15:2] xa_i;
  logic xce_n_i, xre_n_i, xwe_n_i, xd_oe, int_n_o, ad_oe, adclk_o, adrw_o;
  logic [15:0] xd_i, xd_o;
  logic [11:0] ad_i, ad_o, dac1_o, dac2_o;
  logic dac1_clk_o, dac1_wrt_o, dac2_clk_o, dac2_wrt_o, csdac1_n_o, ltp_start_o;

  fpga_top #(.INT_DECIM(DECIM)) dut (
    .clk_62m5(clk), .rst_n(rst_n), .xa_i(xa_i), .xce_n_i(xce_n_i), .xre_n_i(xre_n_i),
    .xwe_n_i(xwe_n_i), .xd_i(xd_i), .xd_o(xd_o), .xd_oe(xd_oe), .int_n_o(int_n_o),
    .ad_i(ad_i), .ad_o(ad_o), .ad_oe(ad_oe), .adclk_o(adclk_o), .adrw_o(adrw_o),
    .dac1_o(dac1_o), .dac1_clk_o(dac1_clk_o), .dac1_wrt_o(dac1_wrt_o), .dac2_o(dac2_o),
    .dac2_clk_o(dac2_clk_o), .dac2_wrt_o(dac2_wrt_o), .csdac1_n_o(csdac1_n_o),
    .ltp_start_o(ltp_start_o));

  always #8 clk = ~clk;   // 62.5 MHz, time unit = 1 ns

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    #12_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- counters
  int n_cfg = 0, n_int = 0, n_read = 0, n_dac2 = 0, n_peaks = 0, n_starts = 0;
  int n_l1 = 0, n_l2 = 0, n_env_nonzero = 0;

  // ---------------------------------------------------------------- LTP
  int start_cyc = -1, cyc = 0;
  bit rst_done = 1'b0;               // set once the reset pulse is over
  always @(negedge clk) if (rst_done) begin
    cyc++;
    if (dac1_o == 12'd2000) n_l1++;
    if (dac1_o == 12'd1231) n_l2++;
    if (ltp_start_o) begin
      if (start_cyc >= 0) check(cyc - start_cyc == PERIOD, $sformatf("LTP period %0d", cyc - start_cyc));
      start_cyc = cyc;
      n_starts++;
    end
  end

  // ---------------------------------------------------------------- ADC clock
  int last_adclk = -1;
  always @(posedge adclk_o) begin
    if (last_adclk >= 0) check(cyc - last_adclk == 60, $sformatf("ADC clock period %0d", cyc - last_adclk));
    last_adclk = cyc;
  end

  // ---------------------------------------------------------------- ADC + echo model
  int  samp_idx = 0;                 // ADC samples since the last LTP start
  int  n_edge = 0;                   // rising ADC clock edges since reset
  int  samp_reg = 2048;              // model of the FPGA's sample register
  int  exp_env = 0;                  // expected envelope register
  iir_state_t st_i = '{0, 0}, st_q = '{0, 0};
  logic [11:0] cfg_words [$];

  function automatic int echo(int sh, int n);
    real v = 0.0;
    for (int e = 0; e < 4; e++) begin
      int d = n - ECHO_AT[sh][e] + 10;   // 20-sample Hann burst centred on ECHO_AT
      if (d >= 0 && d < 20)
        v += ECHO_AMP[sh][e] * (0.5 - 0.5 * $cos(2.0 * PI * real'(d) / 20.0))
             * $sin(2.0 * PI * 0.15 * real'(n));
    end
    return int'(v);
  endfunction

  always @(posedge ltp_start_o) samp_idx = 0;

  always @(posedge adclk_o) begin
    int c_s, c_c, ii, qq, r, x;
    n_edge++;
    // model of the demodulator register update at this edge
    c_s = (n_edge <= 1) ? 0 : sin_ref(n_edge - 2);
    c_c = (n_edge <= 1) ? 0 : cos_ref(n_edge - 2);
    x  = samp_reg - 2048;
    ii = iir_ref(st_i, int'(fdiv(longint'(x) * c_s, 5)));
    qq = iir_ref(st_q, int'(fdiv(longint'(x) * c_c, 5)));
    r  = isqrt((longint'(ii) * ii + longint'(qq) * qq) / 2);
    exp_env = (r > 2047) ? 2047 : r;
    if (adrw_o) samp_reg = int'(ad_i);
  end

  always @(negedge adclk_o) begin
    // the ADC presents its next conversion after the falling clock edge
    ad_i = 12'(2048 + echo((n_starts >= 2) ? 1 : 0, samp_idx) + int'($urandom_range(30)) - 15);
    samp_idx++;
  end

  logic oe_q = 1'b0;
  always @(negedge clk) begin
    if (ad_oe && !oe_q) begin
      cfg_words.push_back(ad_o);
      n_cfg++;
    end
    oe_q = ad_oe;
  end

  // ---------------------------------------------------------------- DSP model
  task automatic emif_write(input logic [15:2] a, input logic [15:0] d);
    @(negedge clk);
    xa_i = a; xce_n_i = 1'b0; xd_i = d;
    @(negedge clk); xwe_n_i = 1'b0;
    repeat (28) @(negedge clk);
    xwe_n_i = 1'b1;
    @(negedge clk); xce_n_i = 1'b1;
  endtask

  task automatic emif_read(input logic [15:2] a, output logic [15:0] d);
    @(negedge clk);
    xa_i = a; xce_n_i = 1'b0;
    @(negedge clk); xre_n_i = 1'b0;
    repeat (7) @(negedge clk);
    check(xd_oe, "FPGA drives the bus during the read");
    d = xd_o;
    xre_n_i = 1'b1;
    @(negedge clk); xce_n_i = 1'b1;
    #1 check(!xd_oe, "bus released after the read");
  endtask

  int maf_buf [4];
  int last_int = -1, int_cyc = 0;
  int t_dsp = 0;                     // interrupts since the last LTP start
  int peaks [$];
  int shot_no = 0;                   // 0: asymmetric placement, 1: symmetric

  // peak detector with hysteresis on the moving-average output: a maximum is
  // reported once the signal has fallen HYST below it after rising; the next
  // one needs a rise of HYST above the following minimum
  localparam int HYST = 12, THRESH = 60;
  int  pk_val = 0, pk_t = 0, valley = 0;
  bit  rising = 1'b1;

  task automatic detect(int m, int t);
    if (rising) begin
      if (m > pk_val) begin pk_val = m; pk_t = t; end
      else if (pk_val > THRESH && m < pk_val - HYST) begin
        peaks.push_back(pk_t);
        rising = 1'b0; valley = m;
      end
    end else begin
      if (m < valley) valley = m;
      else if (m > valley + HYST) begin rising = 1'b1; pk_val = m; pk_t = t; end
    end
  endtask

  task automatic end_shot();
    int expect_t;
    if (peaks.size() == 0) return;
    if (shot_no == 0) $display("  asymmetric placement:");
    else              $display("  symmetric placement:");
    check(peaks.size() == 4, $sformatf("%0d echo maxima found, expected 4", peaks.size()));
    foreach (peaks[i]) begin
      $display("  echo %0d: maximum at %0d us (echo centre %0d us)", i + 1, peaks[i],
               (i < 4) ? ECHO_AT[shot_no][i] : -1);
      if (i < 4) begin
        // demodulator and the 16 us average delay the maximum by about 14 samples
        expect_t = ECHO_AT[shot_no][i] + 14;
        check(peaks[i] >= expect_t - 4 && peaks[i] <= expect_t + 4,
              $sformatf("echo %0d at %0d, expected %0d +/- 4", i + 1, peaks[i], expect_t));
      end
    end
    n_peaks += peaks.size();
    shot_no++;
    peaks.delete();
    pk_val = 0; rising = 1'b1;
  endtask

  initial begin
    logic [15:0] d;
    int env, sum, maf, last_written, t_now;
    bit  have_written;
    xa_i = '0; xce_n_i = 1'b1; xre_n_i = 1'b1; xwe_n_i = 1'b1; xd_i = '0;
    foreach (maf_buf[i]) maf_buf[i] = 0;
    have_written = 1'b0;
    #20 rst_n = 1'b0;             // asynchronous reset pulse
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    rst_done = 1'b1;
    // ADC configuration: reset sequence, then CR0 and CR1 (upper 12 bits)
    emif_write(14'h0, 16'h4010);
    emif_write(14'h0, 16'h4000);
    emif_write(14'h0, 16'h01A0);
    emif_write(14'h0, 16'h4D20);
    check(cfg_words.size() == 4, $sformatf("%0d configuration words", cfg_words.size()));
    if (cfg_words.size() == 4)
      check(cfg_words[0] == 12'h401 && cfg_words[1] == 12'h400 &&
            cfg_words[2] == 12'h01A && cfg_words[3] == 12'h4D2, "configuration words reach the ADC");
    // free run: one interrupt per sample
    while (n_starts < N_SHOTS + 1) begin
      @(negedge int_n_o);
      int_cyc = cyc;
      check(!adclk_o, "interrupt in the low half of the sample clock");
      n_int++;
      emif_read(14'h0, d);
      // the previous write has been copied to DAC2 since the clock fell
      if (have_written) begin
        if (dac2_o == 12'(last_written)) n_dac2++;
        check(dac2_o == 12'(last_written), $sformatf("DAC2 %0d, written %0d", dac2_o, last_written));
      end
      n_read++;
      check(d[3:0] == 4'h0, "envelope on data bits 15:4");
      env = int'(d[15:4]) - 2048;
      check(env == exp_env, $sformatf("interrupt %0d: envelope %0d, model %0d", n_int, env, exp_env));
      if (env > 0) n_env_nonzero++;
      // 16-sample moving average
      for (int i = 3; i > 0; i--) maf_buf[i] = maf_buf[i-1];
      maf_buf[0] = env;
      sum = 0;
      foreach (maf_buf[i]) sum += maf_buf[i];
      maf = sum / 4;
      // time in samples since the LTP start; a drop means a new shot
      t_now = (cyc - start_cyc) / 60;
      if (t_now < t_dsp) end_shot();
      t_dsp = t_now;
      if (t_dsp < 400) detect(maf, t_dsp);
      if (last_int >= 0)
        check(int_cyc - last_int == 60 * DECIM, $sformatf("interrupt spacing %0d", int_cyc - last_int));
      last_int = int_cyc;
      // filtered value back to DAC2
      emif_write(14'h3, {12'(maf + 2048), 4'h0});
      last_written = maf + 2048;
      have_written = 1'b1;
    end
    end_shot();
    $display("mechanisms: cfg_writes=%0d ltp_starts=%0d ltp_level1_cycles=%0d ltp_level2_cycles=%0d",
             n_cfg, n_starts, n_l1, n_l2);
    $display("            interrupts=%0d dsp_reads=%0d nonzero_envelopes=%0d dac2_updates=%0d echo_maxima=%0d",
             n_int, n_read, n_env_nonzero, n_dac2, n_peaks);
    check(n_cfg == 4, "ADC configuration writes happened");
    check(n_starts == N_SHOTS + 1, "LTP restarts happened");
    check(n_l1 >= 265 * N_SHOTS && n_l2 >= 264 * N_SHOTS, $sformatf("LTP level cycles %0d/%0d", n_l1, n_l2));
    check(n_int > 1000 * N_SHOTS && n_int < 1100 * (N_SHOTS + 1), $sformatf("%0d interrupts", n_int));
    check(n_read == n_int, "one read per interrupt");
    check(n_env_nonzero > 100, "envelopes seen");
    check(n_dac2 > 1000 * N_SHOTS, "DAC2 updates happened");
    check(n_peaks == 4 * N_SHOTS, $sformatf("%0d echo maxima over %0d shots", n_peaks, N_SHOTS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
