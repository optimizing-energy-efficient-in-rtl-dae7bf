// csd_encoder: two's complement to canonical signed digit recoding.
//
// Produces the non-adjacent form of a C_W-bit two's complement number: C_W
// digits in {-1, 0, +1}, no two neighbours non-zero, with the fewest
// non-zero digits of any signed-digit form. A carry runs from the least
// significant bit up. At bit i, s = a[i] + carry. If s is odd the digit is
// non-zero: -1 with a carry out when the next bit a[i+1] is one (turning a
// run of ones into 100..0-1), +1 without carry otherwise. If s is even the
// digit is zero and the carry out is s/2. The bit above the top is the sign
// (sign extension), which makes C_W digits enough for every C_W-bit value.
//
// Interface: coef (two's complement), digits[i] (weight 2**i).
// Purely combinational.
//
// Recoding the coefficients into CSD follows the filter's description; doing
// it in hardware at coefficient load time (instead of offline) is this
// design's choice, so the coefficient file can stay in plain binary.
module csd_encoder
  import fir_pkg::*;
#(
  parameter int unsigned C_W = DEF_C_W
) (
  input  logic [C_W-1:0] coef,
  output csd_digit_t     digits [C_W]
);

  logic [C_W:0] a;      // sign-extended coefficient

  assign a = {coef[C_W-1], coef};

  always_comb begin
    logic carry;
    carry = 1'b0;
    for (int unsigned i = 0; i < C_W; i++) begin
      if (a[i] ^ carry) begin
        digits[i] = a[i+1] ? CSD_NEG : CSD_POS;
        carry     = a[i+1];
      end else begin
        digits[i] = CSD_ZERO;
        carry     = a[i] & carry;
      end
    end
  end

endmodule
