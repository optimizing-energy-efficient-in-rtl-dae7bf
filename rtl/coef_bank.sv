// coef_bank: reconfigurable coefficient store in grouped CSD form.
//
// One coefficient h[addr] is written per cycle with we high, as a plain two's
// complement number. On the way in it is recoded into canonical signed
// digits (csd_encoder), padded with zero digits to a multiple of three, and
// every 3-digit group is turned into a group code (fir_pkg::group_code):
// which shared multiple (x, 3x or 5x) the group needs, with what shift and
// sign. The codes of all taps are held in registers and presented in
// parallel to the tap computation, so a new coefficient set takes effect
// tap by tap as it is written, without stopping the filter.
//
// Interface: clk (in the filter, a gated clock that runs only while
// coefficients are written), rst_n (asynchronous, active low, clears every
// coefficient to zero), we, addr, coef, codes[tap][group].
// Timing: a write at one edge shows on codes right after it.
//
// Coefficient loading, CSD recoding and 3-bit grouping follow the filter's
// description; the write port and the code format are this design's own.
module coef_bank
  import fir_pkg::*;
#(
  parameter int unsigned N_TAPS = DEF_N_TAPS,
  parameter int unsigned C_W    = DEF_C_W,
  localparam int unsigned NG    = (C_W + 2) / 3,
  localparam int unsigned AW    = (N_TAPS > 1) ? $clog2(N_TAPS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [C_W-1:0] coef,
  output grp_code_t     codes [N_TAPS][NG]
);

  csd_digit_t digits [C_W];
  csd_digit_t padded [3*NG];
  grp_code_t  new_codes [NG];

  csd_encoder #(.C_W(C_W)) u_csd (
    .coef  (coef),
    .digits(digits)
  );

  always_comb begin
    for (int unsigned i = 0; i < 3 * NG; i++)
      padded[i] = (i < C_W) ? digits[i] : CSD_ZERO;
    for (int unsigned g = 0; g < NG; g++)
      new_codes[g] = group_code(padded[3*g+2], padded[3*g+1], padded[3*g]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < N_TAPS; k++)
        for (int unsigned g = 0; g < NG; g++)
          codes[k][g] <= '0;
    end else if (we && (32'(addr) < N_TAPS)) begin
      codes[addr] <= new_codes;
    end
  end

endmodule
