// fir_pkg: types and helpers shared by the multiplierless FIR filter.
//
// A coefficient is recoded into canonical signed digits (CSD: digits -1, 0,
// +1 with no two adjacent non-zero digits) and cut into groups of three
// digits. Because of the non-adjacency rule a 3-digit group can only be
// worth 0, +-1, +-2, +-4, +-3 (= 4 - 1) or +-5 (= 4 + 1). Every group is
// therefore one of three shared multiples of the sample (1x, 3x, 5x),
// shifted left by 0..2 and possibly negated. grp_code_t stores that choice;
// group_code() derives it from the three digits. The 3-digit grouping and
// the use of CSD follow the filter's description; the exact encoding of the
// codes is this design's own.
package fir_pkg;

  // One canonical signed digit.
  typedef enum logic [1:0] {
    CSD_ZERO = 2'b00,
    CSD_POS  = 2'b01,
    CSD_NEG  = 2'b11
  } csd_digit_t;

  // Which shared multiple of the sample a digit group selects.
  typedef enum logic [1:0] {
    MUL_NONE = 2'd0,
    MUL_X1   = 2'd1,
    MUL_X3   = 2'd2,
    MUL_X5   = 2'd3
  } mul_sel_t;

  // Code of one 3-digit group: value = (neg ? -1 : 1) * multiple << shift.
  typedef struct packed {
    logic       neg;
    mul_sel_t   sel;
    logic [1:0] shift;
  } grp_code_t;

  // Default sizes of the filter (see the top module for their meaning).
  localparam int unsigned DEF_N_TAPS = 16;
  localparam int unsigned DEF_X_W    = 16;
  localparam int unsigned DEF_C_W    = 16;
  localparam int unsigned DEF_Y_W    = 16;

  // Number of shared multiples produced per sample (1x, 3x, 5x).
  localparam int unsigned N_MULT = 3;

  // Number of 3-digit groups of a C_W-digit CSD word.
  function automatic int unsigned num_groups(int unsigned c_w);
    return (c_w + 2) / 3;
  endfunction

  // Signed value of a digit.
  function automatic int digit_val(csd_digit_t d);
    case (d)
      CSD_POS: return 1;
      CSD_NEG: return -1;
      default: return 0;
    endcase
  endfunction

  // Group code of digits d2 d1 d0 (d2 most significant).
  function automatic grp_code_t group_code(csd_digit_t d2, csd_digit_t d1, csd_digit_t d0);
    grp_code_t c;
    int        v;
    int        a;
    v = 4 * digit_val(d2) + 2 * digit_val(d1) + digit_val(d0);
    a = (v < 0) ? -v : v;
    c.neg = (v < 0);
    case (a)
      1:       begin c.sel = MUL_X1;   c.shift = 2'd0; end
      2:       begin c.sel = MUL_X1;   c.shift = 2'd1; end
      4:       begin c.sel = MUL_X1;   c.shift = 2'd2; end
      3:       begin c.sel = MUL_X3;   c.shift = 2'd0; end
      5:       begin c.sel = MUL_X5;   c.shift = 2'd0; end
      default: begin c.sel = MUL_NONE; c.shift = 2'd0; c.neg = 1'b0; end
    endcase
    return c;
  endfunction

endpackage
