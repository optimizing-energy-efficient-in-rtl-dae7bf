// tb_post_accum: checks the retimed adder tree and HUB rounding at 16 taps,
// with the output as wide as the full sum (so the sum itself is checked
// exactly), and at 5 taps (a count that is not a power of two) rounded to
// 10 bits, 13 sum bits dropped. Each instance has its data registers on a
// clock gated by its own busy signal. See post_accum_check for the checks.
// After the stream stops, the gated clock must stay off: the number of
// gated cycles is checked to grow once the pipeline has drained.
module tb_post_accum;
  logic clk = 1'b0, rst_n = 1'b1, run = 1'b0;
  int c16, f16, g16, c5, f5, g5;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  post_accum_check #(.N(16), .P_W(32), .Y_W(36), .OUT_MSB(35)) u16 (.clk(clk), .rst_n(rst_n), .run(run),
    .checks(c16), .failures(f16), .gated_cycles(g16));
  post_accum_check #(.N(5), .P_W(20), .Y_W(10), .OUT_MSB(22)) u5 (.clk(clk), .rst_n(rst_n), .run(run),
    .checks(c5), .failures(f5), .gated_cycles(g5));

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c16 + c5, f16 + f5 + 1);
    $finish;
  end

  initial begin
    int g_before;
    #1 rst_n = 1'b0;   // falling edge: asynchronous reset
    #21 rst_n = 1'b1;
    @(negedge clk);
    run = 1'b1;
    repeat (600) @(negedge clk);
    run = 1'b0;
    repeat (10) @(negedge clk);
    g_before = g16;
    repeat (20) @(negedge clk);
    checks = c16 + c5 + 1;
    failures = f16 + f5;
    if (g16 - g_before != 20) begin
      failures++;
      $display("FAIL gated clock ran while idle (%0d of 20 cycles gated)", g16 - g_before);
    end
    if (c16 < 300 || c5 < 300) begin
      failures++;
      $display("FAIL too few results: %0d %0d", c16, c5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
