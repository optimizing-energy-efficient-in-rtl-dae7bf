// tb_tap_mult: checks the shift-and-add tap product.
//
// The test bench builds its own inputs: the multiples x, 3x, 5x by integer
// arithmetic, and the group codes of a random coefficient by its own CSD
// recoding (v mod 4 rule) and grouping. The product must equal x * h
// exactly, for random and extreme operands.
module tb_tap_mult;
  import fir_pkg::*;
  localparam int unsigned XW = 16;
  localparam int unsigned CW = 16;
  localparam int unsigned NG = (CW + 2) / 3;
  int checks = 0, failures = 0;
  logic signed [XW+2:0]     m [N_MULT];
  grp_code_t                codes [NG];
  logic signed [XW+CW-1:0]  p;

  tap_mult #(.X_W(XW), .C_W(CW)) dut (.m(m), .codes(codes), .p(p));

  // Reference CSD digits of v (weight 2**i at index i).
  function automatic void ref_csd(input int v, output int d [3*NG]);
    for (int i = 0; i < 3 * NG; i++) begin
      if (v % 2 != 0) begin
        int r = ((v % 4) + 4) % 4;
        d[i] = (r == 1) ? 1 : -1;
        v = v - d[i];
      end else d[i] = 0;
      v = v / 2;
    end
  endfunction

  task automatic make_codes(input int h);
    int d [3*NG];
    ref_csd(h, d);
    for (int g = 0; g < NG; g++) begin
      int v = 4 * d[3*g+2] + 2 * d[3*g+1] + d[3*g];
      int a = (v < 0) ? -v : v;
      codes[g].neg = (v < 0);
      codes[g].shift = 2'd0;
      case (a)
        0: begin codes[g].sel = MUL_NONE; codes[g].neg = 1'b0; end
        1: codes[g].sel = MUL_X1;
        2: begin codes[g].sel = MUL_X1; codes[g].shift = 2'd1; end
        4: begin codes[g].sel = MUL_X1; codes[g].shift = 2'd2; end
        3: codes[g].sel = MUL_X3;
        5: codes[g].sel = MUL_X5;
        default: $display("reference recoding error");
      endcase
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, h;
    for (int t = 0; t < 4000; t++) begin
      x = int'($signed(16'($urandom)));
      h = int'($signed(16'($urandom)));
      if (t % 7 == 0) x = (t % 2) ? -32768 : 32767;
      if (t % 11 == 0) h = (t % 3) ? -32768 : 32767;
      if (t % 13 == 0) h = 21845;   // 0101...: dense digits
      m[0] = 19'(x); m[1] = 19'(3 * x); m[2] = 19'(5 * x);
      make_codes(h);
      #1;
      checks++;
      if (longint'(p) != longint'(x) * longint'(h)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d h=%0d p=%0d", x, h, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
