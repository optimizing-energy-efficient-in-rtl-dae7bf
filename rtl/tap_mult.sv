// tap_mult: multiplierless product of one tap.
//
// Forms p = x * h from the shared multiples of the sample (m = {x, 3x, 5x})
// and the group codes of the coefficient: group g, worth
// (+-)(multiple << shift) * 8**g, contributes its selected multiple shifted
// by shift + 3g and negated when its code says so. There is no multiplier,
// only a selector, a shifter and an adder per group; a 16-bit coefficient
// has six groups. The sum is taken modulo 2**P_W; since the true product
// always fits in P_W = X_W + C_W bits, the result is exact.
//
// Interface: m[0..2] (signed, X_W+3 bits), codes[0..NG-1], p (signed, P_W).
// Purely combinational; the filter registers p.
//
// The shift-and-add tap computation on CSD groups follows the filter's
// description; the selector form, which lets the coefficient change at run
// time, is this design's reading of its reconfigurability.
module tap_mult
  import fir_pkg::*;
#(
  parameter int unsigned X_W = DEF_X_W,
  parameter int unsigned C_W = DEF_C_W,
  localparam int unsigned MW  = X_W + 3,
  localparam int unsigned NG  = (C_W + 2) / 3,
  localparam int unsigned P_W = X_W + C_W
) (
  input  logic signed [MW-1:0]  m     [N_MULT],
  input  grp_code_t             codes [NG],
  output logic signed [P_W-1:0] p
);

  always_comb begin
    logic signed [P_W-1:0] term;
    p = '0;
    for (int unsigned g = 0; g < NG; g++) begin
      case (codes[g].sel)
        MUL_X1:  term = P_W'(m[0]);
        MUL_X3:  term = P_W'(m[1]);
        MUL_X5:  term = P_W'(m[2]);
        default: term = '0;
      endcase
      term = term <<< (32'(codes[g].shift) + 3 * g);
      p    = codes[g].neg ? (p - term) : (p + term);
    end
  end

endmodule
