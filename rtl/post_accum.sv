// post_accum: retimed adder tree that sums the tap products, with
// Half-Unit Biased (HUB) rounding of the result.
//
// The N_TAPS products are first captured in a register bank (a cut-set
// between the tap computation and the accumulation), then summed pairwise in
// a balanced binary tree of L = ceil(log2(N_TAPS)) levels with a register
// after every level. Each register row is a feed-forward cut-set that cuts
// every path from the products to the sum once, so the arithmetic is that of
// the unpipelined tree and only the latency grows; the critical path is one
// adder. Tap counts that are not a power of two are padded with zero
// inputs, which take no adder logic. The sum keeps full precision,
// ACC_W = P_W + L bits, so no overflow can occur inside the tree.
//
// The full-precision sum is then rounded to Y_W bits in the HUB format. A
// HUB number stands for its stored bits plus half of their last place (an
// implicit least significant one, the ILSB). Rounding to the nearest HUB
// number is plain truncation: y_hub keeps sum bits OUT_MSB..OUT_MSB-Y_W+1.
// The error lies in (-1/2, +1/2] of the last stored place, centred like
// round-to-nearest, where truncation to a conventional number errs by
// [0, 1) and is biased; no rounding adder is needed. y_out is the same value
// as an ordinary two's complement number with the ILSB written out, so its
// LSB is a constant one by design. The sum bits above OUT_MSB (sign copies
// when the result is in range) and below the kept field are unused.
//
// The data registers run on gclk, a clock the filter gates off when no
// valid sample is in flight; a valid bit runs beside the data on the free
// clock clk and says when the output is a result. busy asks for gclk: it is
// high while in_valid or any valid bit in the pipe is high.
//
// Interface: clk, gclk, rst_n (asynchronous, active low), in_valid, prods,
// busy, y_valid, y_hub, y_out.
// Timing: products presented with in_valid before edge e give a result with
// y_valid after edge e + L (L + 1 register stages).
//
// Summing in an adder tree, cut-set retiming it and HUB rounding of the
// output follow the filter's description; where the cut-sets are placed
// (after the products and after every tree level) and which sum bits are
// kept are this design's choices.
module post_accum #(
  parameter int unsigned N_TAPS = fir_pkg::DEF_N_TAPS,
  parameter int unsigned P_W    = fir_pkg::DEF_X_W + fir_pkg::DEF_C_W,
  parameter int unsigned Y_W     = fir_pkg::DEF_Y_W,
  parameter int unsigned OUT_MSB = P_W - 2,
  localparam int unsigned L     = (N_TAPS > 1) ? $clog2(N_TAPS) : 0,
  localparam int unsigned NP    = 1 << L,
  localparam int unsigned ACC_W = P_W + L
) (
  input  logic                    clk,
  input  logic                    gclk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [P_W-1:0]   prods [N_TAPS],
  output logic                    busy,
  output logic                    y_valid,
  output logic signed [Y_W-1:0]   y_hub,
  output logic signed [Y_W:0]     y_out
);

  // tree[l][i]: register row l (row 0 holds the products).
  logic signed [ACC_W-1:0] tree [L+1][NP];
  logic [L:0]              vld;
  logic signed [ACC_W-1:0] sum;

  // Row 0: the product cut-set.
  for (genvar i = 0; i < NP; i++) begin : g_row0
    if (i < N_TAPS) begin : g_used
      always_ff @(posedge gclk or negedge rst_n) begin
        if (!rst_n) tree[0][i] <= '0;
        else        tree[0][i] <= ACC_W'(prods[i]);
      end
    end else begin : g_pad
      assign tree[0][i] = '0;
    end
  end

  // Rows 1..L: one adder level each, registered.
  for (genvar l = 1; l <= L; l++) begin : g_lvl
    for (genvar i = 0; i < NP; i++) begin : g_node
      if (i < (NP >> l)) begin : g_add
        always_ff @(posedge gclk or negedge rst_n) begin
          if (!rst_n) tree[l][i] <= '0;
          else        tree[l][i] <= tree[l-1][2*i] + tree[l-1][2*i+1];
        end
      end else begin : g_unused
        assign tree[l][i] = '0;
      end
    end
  end

  // Valid bits beside the data, on the free-running clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= (vld << 1) | (L+1)'(in_valid);
  end

  assign busy      = in_valid | (|vld[L:0]);
  assign y_valid   = vld[L];
  assign sum       = tree[L][0];

  // HUB rounding: truncate, the ILSB supplies the half unit.
  assign y_hub = sum[OUT_MSB -: Y_W];
  assign y_out = {y_hub, 1'b1};

endmodule
