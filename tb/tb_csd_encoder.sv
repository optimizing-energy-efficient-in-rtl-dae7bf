// tb_csd_encoder: exhaustive check of the CSD recoder at 16 bits and at 5 bits.
//
// For every input value the digits must add up to the two's complement
// value, and no two neighbouring digits may both be non-zero; these two
// properties define the canonical signed digit form uniquely. The count of
// non-zero digits is also compared with the minimum computed by an
// independent integer recoding (v mod 4).
module tb_csd_encoder;
  import fir_pkg::*;
  int checks = 0, failures = 0;

  logic [15:0] coef16;
  csd_digit_t  dig16 [16];
  logic [4:0]  coef5;
  csd_digit_t  dig5 [5];

  csd_encoder #(.C_W(16)) dut16 (.coef(coef16), .digits(dig16));
  csd_encoder #(.C_W(5))  dut5  (.coef(coef5),  .digits(dig5));

  // Number of non-zero digits of the non-adjacent form of v (reference).
  function automatic int naf_weight(longint v);
    int w = 0;
    while (v != 0) begin
      if (v % 2 != 0) begin
        longint r = ((v % 4) + 4) % 4;   // 1 or 3
        w++;
        v = (r == 1) ? v - 1 : v + 1;
      end
      v = v / 2;
    end
    return w;
  endfunction

  task automatic check_digits(input longint want, input int n, input csd_digit_t d [16]);
    longint sum = 0;
    int     w = 0;
    bit     adj = 0;
    for (int i = 0; i < n; i++) begin
      sum += longint'(digit_val(d[i])) <<< i;
      if (d[i] != CSD_ZERO) w++;
      if (i > 0 && d[i] != CSD_ZERO && d[i-1] != CSD_ZERO) adj = 1;
    end
    checks++;
    if (sum != want || adj || w != naf_weight(want)) begin
      failures++;
      if (failures < 10)
        $display("FAIL value %0d: digits sum %0d adjacent %0b weight %0d (min %0d)",
                 want, sum, adj, w, naf_weight(want));
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    csd_digit_t d [16];
    for (int v = -32768; v < 32768; v++) begin
      coef16 = 16'(v);
      #1;
      check_digits(longint'(v), 16, dig16);
    end
    for (int v = -16; v < 16; v++) begin
      coef5 = 5'(v);
      #1;
      for (int i = 0; i < 16; i++) d[i] = (i < 5) ? dig5[i] : CSD_ZERO;
      check_digits(longint'(v), 5, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
