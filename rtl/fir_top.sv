// fir_top: reconfigurable, multiplierless, clock-gated FIR filter for
// seismic signal pre-processing.
//
// Computes y[n] = sum_{k=0}^{N_TAPS-1} h[k] * x[n-k] in direct form without
// multipliers. Each coefficient is held as canonical signed digits cut into
// 3-digit groups, and each group is one of three shared multiples of the
// sample (x, 3x, 5x), shifted and signed. The datapath, in order:
//
//   precomputer   x_in -> {x, 3x, 5x}, once per sample
//   delay_line    N_TAPS stages of those multiples (time delay unit)
//   coef_bank     loadable coefficients, CSD-recoded and grouped on write
//   tap_mult      N_TAPS shift-and-add products, one per tap
//   post_accum    product registers + registered adder tree (cut-set
//                 retimed), HUB rounding of the full-precision sum to Y_W bits
//
// Three latch-based clock gates cut the clock of every register bank that
// has nothing to do: the delay line runs only on cycles with in_valid, the
// coefficient bank only on cycles with coef_we, and the product and adder
// registers only while a valid sample is in flight. Only the few valid bits
// and the gate latches see the free-running clock.
//
// Interface: one sample per clock at most on x_in/in_valid (no
// back-pressure); coefficients written one per cycle on coef_we/coef_addr/
// coef_data, two's complement, usable while the filter runs. The result of
// the sample taken at edge e appears on y_hub/y_out with y_valid after edge
// e + LATENCY, LATENCY = ceil(log2(N_TAPS)) + 1 (5 at 16 taps).
// y_hub holds the Y_W stored bits of a HUB number; y_out is the same value
// with the implicit half-unit bit written out as its LSB.
// At defaults data and coefficients are Q1.15 and y_hub is Q1.15 (plus the
// implicit half LSB); the sum wraps if sum|h[k]| >= 1.
//
// The structure (delay line, CSD-coded shared subexpressions, tap
// computation, retimed post accumulation, HUB rounding, latch clock gating)
// follows the filter's description. Sizes, the load port, the stream
// handshake, the register placement and the gate enables are this design's
// own choices; the description gives none of them.
module fir_top
  import fir_pkg::*;
#(
  parameter int unsigned N_TAPS  = DEF_N_TAPS,
  parameter int unsigned X_W     = DEF_X_W,
  parameter int unsigned C_W     = DEF_C_W,
  parameter int unsigned Y_W     = DEF_Y_W,
  parameter int unsigned OUT_MSB = X_W + C_W - 2,
  localparam int unsigned AW     = (N_TAPS > 1) ? $clog2(N_TAPS) : 1,
  localparam int unsigned L      = (N_TAPS > 1) ? $clog2(N_TAPS) : 0,
  localparam int unsigned LATENCY = L + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] x_in,
  input  logic                  coef_we,
  input  logic [AW-1:0]         coef_addr,
  input  logic [C_W-1:0]        coef_data,
  output logic                  y_valid,
  output logic signed [Y_W-1:0] y_hub,
  output logic signed [Y_W:0]   y_out
);

  localparam int unsigned MW    = X_W + 3;
  localparam int unsigned NG    = (C_W + 2) / 3;
  localparam int unsigned P_W   = X_W + C_W;
  localparam int unsigned DW    = N_MULT * MW;

  // Gated clocks.
  logic gclk_dl, gclk_cf, gclk_pa;
  logic pa_busy;

  clock_gate u_cg_dl (.clk(clk), .en(in_valid), .gclk(gclk_dl));
  clock_gate u_cg_cf (.clk(clk), .en(coef_we),  .gclk(gclk_cf));
  clock_gate u_cg_pa (.clk(clk), .en(pa_busy),  .gclk(gclk_pa));

  // Shared subexpressions of the incoming sample.
  logic signed [MW-1:0] m_in [N_MULT];
  logic [DW-1:0]        dl_in;

  precomputer #(.X_W(X_W)) u_pre (.x(x_in), .m(m_in));

  always_comb begin
    for (int unsigned j = 0; j < N_MULT; j++) dl_in[j*MW +: MW] = m_in[j];
  end

  // Time delay unit.
  logic [DW-1:0] dl_taps [N_TAPS];

  delay_line #(.N_TAPS(N_TAPS), .W(DW)) u_dl (
    .clk  (gclk_dl),
    .rst_n(rst_n),
    .din  (dl_in),
    .taps (dl_taps)
  );

  // The delay line holds a new sample on the cycle after in_valid.
  logic dl_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dl_valid <= 1'b0;
    else        dl_valid <= in_valid;
  end

  // Coefficients.
  grp_code_t codes [N_TAPS][NG];

  coef_bank #(.N_TAPS(N_TAPS), .C_W(C_W)) u_coef (
    .clk  (gclk_cf),
    .rst_n(rst_n),
    .we   (coef_we),
    .addr (coef_addr),
    .coef (coef_data),
    .codes(codes)
  );

  // Tap computation.
  logic signed [P_W-1:0] prods [N_TAPS];

  for (genvar k = 0; k < N_TAPS; k++) begin : g_tap
    logic signed [MW-1:0] m_tap [N_MULT];
    for (genvar j = 0; j < N_MULT; j++) begin : g_unpack
      assign m_tap[j] = dl_taps[k][j*MW +: MW];
    end
    tap_mult #(.X_W(X_W), .C_W(C_W)) u_tap (
      .m    (m_tap),
      .codes(codes[k]),
      .p    (prods[k])
    );
  end

  // Post accumulation and HUB rounding.
  post_accum #(.N_TAPS(N_TAPS), .P_W(P_W), .Y_W(Y_W), .OUT_MSB(OUT_MSB)) u_acc (
    .clk     (clk),
    .gclk    (gclk_pa),
    .rst_n   (rst_n),
    .in_valid(dl_valid),
    .prods   (prods),
    .busy    (pa_busy),
    .y_valid (y_valid),
    .y_hub   (y_hub),
    .y_out   (y_out)
  );

  // Every accepted sample yields exactly one result, LATENCY edges later
  // (sampled values, hence one more tick between the two).
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
    y_valid == $past(in_valid, LATENCY + 1))
    else $error("y_valid does not follow in_valid by LATENCY cycles");

endmodule
