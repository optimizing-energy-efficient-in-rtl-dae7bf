// tb_precomputer: checks the shared multiples 1x, 3x and 5x.
//
// Random and extreme signed samples are applied; each output must equal the
// integer product of the sample by 1, 3 and 5.
module tb_precomputer;
  import fir_pkg::*;
  int checks = 0, failures = 0;
  logic signed [15:0] x;
  logic signed [18:0] m [N_MULT];
  int mulv [N_MULT] = '{1, 3, 5};

  precomputer #(.X_W(16)) dut (.x(x), .m(m));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      case (t)
        0: x = 16'sh8000;
        1: x = 16'sh7fff;
        2: x = 16'sh0000;
        3: x = -16'sd1;
        default: x = 16'($urandom);
      endcase
      #1;
      for (int j = 0; j < N_MULT; j++) begin
        checks++;
        if (int'(m[j]) != mulv[j] * int'(x)) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d m[%0d]=%0d", x, j, m[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
