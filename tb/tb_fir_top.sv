// tb_fir_top: end-to-end test of the filter at its default size
// (16 taps, 16-bit Q1.15 samples and coefficients, 16-bit HUB output).
//
// A synthetic seismic trace is filtered: background noise, a slow
// low-frequency swell, and a P-wave-like burst (a decaying oscillation)
// followed by a stronger, slower S-wave-like burst, all plus wide-band noise
// that a low-pass filter should remove. The filter is first loaded with a
// 16-tap Hamming-windowed-sinc low-pass (cut-off at 0.1 of the sample rate),
// quantised to Q1.15. Midway, with the stream paused, it is reconfigured
// with a second set (a 16-tap band-pass, windowed sinc difference), without
// flushing the delay line, and the stream resumes. Near the end a third
// set (a narrower low-pass) is written tap by tap while samples keep
// streaming, and the model follows each write from the edge it lands on.
//
// Samples arrive in runs of back-to-back cycles separated by random gaps.
// Every output is compared with an exact integer model of the filter
// (y_hub = floor(sum h[k] x[n-k] / 2**15), the y_out LSB one), its arrival
// is checked to be exactly LATENCY = 5 edges after its sample, and its
// value is checked to lie within half an output place of the exact sum.
// The test also counts each mechanism of the design and fails if one never
// happened: delay-line clock gated off, coefficient-bank clock gated off,
// adder-pipeline clock gated off, coefficient writes while running,
// back-to-back samples, gaps, and outputs where HUB rounding dropped a
// non-zero remainder.
module tb_fir_top;
  localparam int N       = 16;
  localparam int LATENCY = 5;
  localparam int NSAMP   = 3000;
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

  // Reference model state.
  int     h [N];
  int     xh [N];              // xh[k] = x[n-k]
  longint exp_sum [$];
  int     exp_cyc [$];
  int     cyc = 0;
  int     n_out = 0;

  // Mechanism counters.
  int cnt_dl_gated = 0, cnt_cf_gated = 0, cnt_pa_gated = 0;
  int cnt_coef_writes = 0, cnt_live_writes = 0, cnt_back2back = 0, cnt_gaps = 0, cnt_hub_round = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    #1;
    if (rst_n) begin
      if (!dut.gclk_dl) cnt_dl_gated++;
      if (!dut.gclk_cf) cnt_cf_gated++;
      if (!dut.gclk_pa) cnt_pa_gated++;
    end
  end

  // Output checker.
  always @(negedge clk) begin
    if (rst_n && y_valid) begin
      longint e;
      int     c;
      longint err;
      checks++;
      if (exp_sum.size() == 0) begin
        failures++;
        $display("FAIL unexpected y_valid at cycle %0d", cyc);
      end else begin
        e = exp_sum.pop_front();
        c = exp_cyc.pop_front();
        n_out++;
        if (y_hub !== 16'(e >>> 15) || y_out !== {16'(e >>> 15), 1'b1}) begin
          failures++;
          if (failures < 10) $display("FAIL output %0d at cycle %0d: y_hub %0d expected %0d (sum %0d)", n_out, cyc, $signed(y_hub), $signed(16'(e >>> 15)), e);
        end
        checks++;
        if (cyc - c != LATENCY) begin
          failures++;
          if (failures < 10) $display("FAIL output %0d latency %0d", n_out, cyc - c);
        end
        // Value of y_out in units of 2**-16 against the exact sum in 2**-30.
        err = longint'(y_out) * (longint'(1) << 14) - e;
        checks++;
        if (err <= -(longint'(1) << 14) || err > (longint'(1) << 14)) begin
          failures++;
          if (failures < 10) $display("FAIL output %0d rounding error %0d", n_out, err);
        end
        if ((e & ((longint'(1) << 15) - 1)) != 0) cnt_hub_round++;
      end
    end
  end

  // Quantise a real in (-1, 1) to Q1.15.
  function automatic int q15(real v);
    int q = int'($floor(v * 32768.0 + 0.5));
    if (q > 32767) q = 32767;
    if (q < -32768) q = -32768;
    return q;
  endfunction

  function automatic real hamming(int k);
    return 0.54 - 0.46 * $cos(2.0 * PI * k / (N - 1));
  endfunction

  function automatic real sinc_lp(int k, real fc);
    real t = k - (N - 1) / 2.0;
    return 2.0 * fc * $sin(2.0 * PI * fc * t) / (2.0 * PI * fc * t);
  endfunction

  // Write a coefficient set (one per cycle).
  task automatic load_coefs(input real hr [N]);
    real asum = 0.0;
    for (int k = 0; k < N; k++) asum += (hr[k] < 0.0) ? -hr[k] : hr[k];
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      coef_we   = 1'b1;
      coef_addr = 4'(k);
      coef_data = 16'(q15(0.95 * hr[k] / asum));
      h[k]      = q15(0.95 * hr[k] / asum);
      cnt_coef_writes++;
    end
    @(negedge clk);
    coef_we = 1'b0;
  endtask

  // Synthetic seismic trace.
  function automatic real trace(int n);
    real v = 0.04 * ($itor($urandom_range(0, 2000)) / 1000.0 - 1.0);   // wide-band noise
    v += 0.05 * $sin(2.0 * PI * 0.004 * n);                               // slow swell
    if (n >= 400) v += 0.30 * $exp(-(n - 400) / 250.0) * $sin(2.0 * PI * 0.05 * (n - 400));   // P burst
    if (n >= 1200) v += 0.45 * $exp(-(n - 1200) / 500.0) * $sin(2.0 * PI * 0.02 * (n - 1200)); // S burst
    return v;
  endfunction

  task automatic send(input int n);
    longint s = 0;
    int     xq = q15(trace(n));
    for (int k = N - 1; k > 0; k--) xh[k] = xh[k-1];
    xh[0] = xq;
    for (int k = 0; k < N; k++) s += longint'(h[k]) * longint'(xh[k]);
    in_valid = 1'b1;
    x_in     = 16'(xq);
    exp_sum.push_back(s);
    exp_cyc.push_back(cyc + 1);
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real hr [N];
    int  n = 0;
    logic last_valid = 1'b0;
    logic reconfigured = 1'b0;
    int   live_k = 0;
    real  h3 [N];
    real  asum3;
    for (int k = 0; k < N; k++) begin h[k] = 0; xh[k] = 0; end
    #1 rst_n = 1'b0;   // falling edge: asynchronous reset
    #21 rst_n = 1'b1;

    // Low-pass set.
    for (int k = 0; k < N; k++) hr[k] = sinc_lp(k, 0.1) * hamming(k);
    load_coefs(hr);

    while (n < NSAMP) begin
      @(negedge clk);
      if (n == NSAMP / 2 && !reconfigured) begin
        reconfigured = 1'b1;
        // Pause, drain, reconfigure to a band-pass set, resume.
        in_valid = 1'b0;
        repeat (LATENCY + 2) @(negedge clk);
        for (int k = 0; k < N; k++) hr[k] = (sinc_lp(k, 0.15) - sinc_lp(k, 0.05)) * hamming(k);
        load_coefs(hr);
        @(negedge clk);
        last_valid = 1'b0;
      end
      // Live reconfiguration: from sample 2400 on, a narrower low-pass set
      // is written one tap per cycle while samples keep streaming. A write
      // and a sample set up for the same edge: the sample already sees the
      // new coefficient, so the model updates h before computing the sum.
      coef_we = 1'b0;
      if (n >= 2400 && live_k < N) begin
        if (live_k == 0) begin
          asum3 = 0.0;
          for (int k = 0; k < N; k++) begin
            h3[k] = sinc_lp(k, 0.05) * hamming(k);
            asum3 += (h3[k] < 0.0) ? -h3[k] : h3[k];
          end
        end
        coef_we   = 1'b1;
        coef_addr = 4'(live_k);
        coef_data = 16'(q15(0.95 * h3[live_k] / asum3));
        h[live_k] = q15(0.95 * h3[live_k] / asum3);
        cnt_coef_writes++;
        if (in_valid) cnt_live_writes++;
        live_k++;
      end
      if ($urandom_range(0, 3) != 0) begin
        send(n);
        n++;
        if (last_valid) cnt_back2back++;
        last_valid = 1'b1;
      end else begin
        in_valid = 1'b0;
        x_in = 16'($urandom);   // garbage that must not enter the filter
        if (last_valid) cnt_gaps++;
        last_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LATENCY + 4) @(negedge clk);

    checks++;
    if (n_out != NSAMP || exp_sum.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs for %0d samples", n_out, NSAMP);
    end
    $display("mechanisms: delay-line gated %0d, coef-bank gated %0d, pipeline gated %0d, coef writes %0d (%0d while streaming), back-to-back %0d, gaps %0d, HUB roundings %0d",
             cnt_dl_gated, cnt_cf_gated, cnt_pa_gated, cnt_coef_writes, cnt_live_writes, cnt_back2back, cnt_gaps, cnt_hub_round);
    checks++;
    if (cnt_dl_gated == 0 || cnt_cf_gated == 0 || cnt_pa_gated == 0 || cnt_coef_writes == 0 || cnt_live_writes == 0 ||
        cnt_back2back == 0 || cnt_gaps == 0 || cnt_hub_round == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
