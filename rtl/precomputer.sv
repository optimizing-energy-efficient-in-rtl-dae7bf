// precomputer: shared subexpressions of one input sample.
//
// Produces the three multiples that every 3-digit CSD group of every
// coefficient draws on: m[0] = x, m[1] = 3x = (x << 2) - x (CSD pattern
// 1 0 -1) and m[2] = 5x = (x << 2) + x (pattern 1 0 1). Each is computed once
// per sample with one adder or subtractor and then travels with the sample
// down the delay line, so every tap reuses it instead of rebuilding it: the
// common-subexpression sharing the filter is built around. Which multiples
// are shared follows from the 3-digit grouping; the document does not list
// them.
//
// Interface: x (signed, X_W bits); m[j] signed, X_W+3 bits, enough for 5x.
// Purely combinational.
module precomputer
  import fir_pkg::*;
#(
  parameter int unsigned X_W = DEF_X_W,
  localparam int unsigned MW = X_W + 3
) (
  input  logic signed [X_W-1:0] x,
  output logic signed [MW-1:0]  m [N_MULT]
);

  logic signed [MW-1:0] x_ext;
  logic signed [MW-1:0] x4;

  assign x_ext = MW'(x);
  assign x4    = x_ext <<< 2;

  assign m[0] = x_ext;
  assign m[1] = x4 - x_ext;
  assign m[2] = x4 + x_ext;

endmodule
