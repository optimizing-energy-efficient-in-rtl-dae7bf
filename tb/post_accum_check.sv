// post_accum_check: drives and checks one post_accum instance of N taps.
//
// Used by tb_post_accum. The data registers run on a clock gated by the
// block's own busy output through a clock_gate, as in the filter, so a busy
// that drops too early corrupts the sums and is caught. Random product
// vectors are presented with in_valid on random cycles (back-to-back runs
// and gaps). Each sum must equal the reference sum of its vector and must
// come out exactly L = ceil(log2(N)) edges after the edge that took the
// products; y_valid must never be high without a pending result. The HUB
// output must be the truncated field of the exact sum with a one appended,
// and y_out must lie within half a stored place of the exact sum.
module post_accum_check #(
  parameter int unsigned N   = 16,
  parameter int unsigned P_W = 32,
  parameter int unsigned Y_W = 36,
  parameter int unsigned OUT_MSB = 35
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output int   checks,
  output int   failures,
  output int   gated_cycles
);
  localparam int unsigned L     = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned ACC_W = P_W + L;
  localparam int unsigned SH    = OUT_MSB - Y_W + 1;   // sum bits dropped

  logic gclk, busy, in_valid, y_valid;
  logic signed [P_W-1:0]   prods [N];
  logic signed [Y_W-1:0]   y_hub;
  logic signed [Y_W:0]     y_out;

  clock_gate u_cg (.clk(clk), .en(busy), .gclk(gclk));

  post_accum #(.N_TAPS(N), .P_W(P_W), .Y_W(Y_W), .OUT_MSB(OUT_MSB)) dut (
    .clk(clk), .gclk(gclk), .rst_n(rst_n), .in_valid(in_valid), .prods(prods),
    .busy(busy), .y_valid(y_valid), .y_hub(y_hub), .y_out(y_out));

  longint exp_sum [$];
  int     exp_cyc [$];
  int     cyc = 0;

  initial begin
    checks = 0; failures = 0; gated_cycles = 0;
    in_valid = 1'b0;
    for (int k = 0; k < N; k++) prods[k] = '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!gclk) gated_cycles <= gated_cycles + 1;
  end

  // Drive on the falling edge.
  always @(negedge clk) begin
    if (rst_n) begin
      // Check output first.
      if (y_valid) begin
        checks <= checks + 1;
        if (exp_sum.size() == 0) begin
          failures <= failures + 1;
          $display("FAIL N=%0d unexpected y_valid", N);
        end else begin
          longint e, err2;
          int     c;
          e = exp_sum.pop_front();
          c = exp_cyc.pop_front();
          // Twice the rounding error, in units of the sum's LSB.
          err2 = longint'(y_out) * (longint'(1) << SH) - 2 * e;
          if (y_hub !== Y_W'(e >>> SH) || y_out !== {Y_W'(e >>> SH), 1'b1} ||
              err2 <= -(longint'(1) << SH) || err2 > (longint'(1) << SH) ||
              cyc - c != int'(L)) begin
            failures <= failures + 1;
            $display("FAIL N=%0d y_hub %0d expected %0d (sum %0d), latency %0d expected %0d",
                     N, y_hub, Y_W'(e >>> SH), e, cyc - c, L);
          end
        end
      end
      in_valid <= 1'b0;
      if (run && ($urandom_range(0, 2) != 0)) begin
        longint s;
        s = 0;
        for (int k = 0; k < N; k++) begin
          logic signed [P_W-1:0] v;
          v = P_W'($urandom);
          if ($urandom_range(0, 9) == 0) v = {1'b1, {(P_W-1){1'b0}}};  // most negative
          prods[k] <= v;
          s += longint'(v);
        end
        in_valid <= 1'b1;
        exp_sum.push_back(s);
        exp_cyc.push_back(cyc + 1);
      end
    end
  end

  final begin
    if (exp_sum.size() != 0) $display("N=%0d results still pending: %0d", N, exp_sum.size());
  end
endmodule
