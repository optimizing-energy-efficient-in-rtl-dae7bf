// tb_fir_noise: noise-removal workload on the full-size filter.
//
// Loads a 16-tap Hamming-windowed-sinc low-pass (cut-off 0.1 of the sample
// rate) and measures what the filter does to signal and noise:
//   1. a low-frequency tone (0.01 fs, the band of the seismic waves) must
//      pass with a gain between 0.8 and 1.1;
//   2. a high-frequency tone (0.35 fs, typical of cultural and
//      instrument noise) must be attenuated by at least 30 dB;
//   3. a synthetic seismic wavelet plus white noise must come out with a
//      signal-to-noise ratio at least 3 dB better than it went in. The
//      wavelet and the noise are filtered in separate passes (the filter is
//      linear, so the output is their sum) and the output SNR is the power of the
//      filtered wavelet over the power of the filtered noise.
// Each pass streams 16 zeros to flush the previous pass, then its samples
// back to back, and discards the first 32 outputs (flush and start-up). Outputs are read as y_out, the HUB value.
module tb_fir_noise;
  localparam int N       = 16;
  localparam int NS      = 1024;
  localparam real PI     = 3.14159265358979;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic               in_valid = 1'b0;
  logic signed [15:0] x_in = '0;
  logic               coef_we = 1'b0;
  logic [3:0]         coef_addr = '0;
  logic [15:0]        coef_data = '0;
  logic               y_valid;
  logic signed [15:0] y_hub;
  logic signed [16:0] y_out;

  fir_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .coef_we(coef_we), .coef_addr(coef_addr), .coef_data(coef_data),
    .y_valid(y_valid), .y_hub(y_hub), .y_out(y_out));

  always #5 clk = ~clk;

  real pin, pout;     // power of input and output of the current pass
  int  nout;
  real xs [NS];

  always @(negedge clk) begin
    if (y_valid) begin
      real y;
      y = $itor(y_out) / 65536.0;
      nout++;
      if (nout > 2 * N) pout += y * y;
    end
  end

  function automatic int q15(real v);
    int q = int'($floor(v * 32768.0 + 0.5));
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return q;
  endfunction

  // Stream N zeros (flushing the previous pass out of the delay line), then
  // xs[]; measure output power after the flush and the start-up transient,
  // and input power over the same samples.
  task automatic run_pass();
    pout = 0.0; pin = 0.0; nout = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      x_in = '0;
    end
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      in_valid = 1'b1;
      x_in = 16'(q15(xs[n]));
      if (n >= N) pin += xs[n] * xs[n];
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
  endtask

  task automatic check(input bit ok, input string what, input real v);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %f", what, v);
    end else $display("%s: %f", what, v);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real hr [N];
    real asum = 0.0;
    real g_lo, g_hi, p_sig, p_noise, p_sig_out, p_noise_out, snr_in, snr_out;
    #1 rst_n = 1'b0;
    #21 rst_n = 1'b1;
    for (int k = 0; k < N; k++) begin
      real t;
      t = k - (N - 1) / 2.0;
      hr[k] = 0.2 * $sin(2.0 * PI * 0.1 * t) / (2.0 * PI * 0.1 * t) *
              (0.54 - 0.46 * $cos(2.0 * PI * k / (N - 1)));
      asum += (hr[k] < 0.0) ? -hr[k] : hr[k];
    end
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_addr = 4'(k); coef_data = 16'(q15(0.95 * hr[k] / asum));
    end
    @(negedge clk);
    coef_we = 1'b0;

    // 1. Low tone.
    for (int n = 0; n < NS; n++) xs[n] = 0.5 * $sin(2.0 * PI * 0.01 * n);
    run_pass();
    g_lo = $sqrt(pout / pin);
    check(g_lo > 0.8 && g_lo < 1.1, "pass-band gain at 0.01 fs", g_lo);

    // 2. High tone.
    for (int n = 0; n < NS; n++) xs[n] = 0.5 * $sin(2.0 * PI * 0.35 * n);
    run_pass();
    g_hi = $sqrt(pout / pin);
    check(20.0 * $log10(g_lo / g_hi) >= 30.0, "stop-band attenuation at 0.35 fs (dB)", 20.0 * $log10(g_lo / g_hi));

    // 3. Seismic wavelet in white noise.
    for (int n = 0; n < NS; n++)
      xs[n] = 0.4 * $exp(-$itor(n) / 300.0) * $sin(2.0 * PI * 0.03 * n);
    run_pass();
    p_sig = pin; p_sig_out = pout;
    for (int n = 0; n < NS; n++)
      xs[n] = 0.1 * ($itor($urandom_range(0, 2000)) / 1000.0 - 1.0);
    run_pass();
    p_noise = pin; p_noise_out = pout;
    snr_in  = 10.0 * $log10(p_sig / p_noise);
    snr_out = 10.0 * $log10(p_sig_out / p_noise_out);
    $display("SNR in %f dB, out %f dB", snr_in, snr_out);
    check(snr_out - snr_in >= 3.0, "SNR improvement (dB)", snr_out - snr_in);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
