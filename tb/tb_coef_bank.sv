// tb_coef_bank: checks the coefficient store and its grouped CSD codes.
//
// After reset every tap's codes must stand for zero. Random coefficients
// (and the extremes) are then written to random taps; after each write the
// codes of every tap are turned back into a number by the test bench,
// sum over groups of (+-)multiple * 2**shift * 8**group with multiples
// 1, 3, 5, and compared with a reference copy of the coefficient set.
// Cycles with we low must change nothing.
module tb_coef_bank;
  import fir_pkg::*;
  localparam int unsigned N  = 16;
  localparam int unsigned CW = 16;
  localparam int unsigned NG = (CW + 2) / 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, we = 1'b0;
  logic [3:0]    addr = '0;
  logic [CW-1:0] coef = '0;
  grp_code_t     codes [N][NG];
  int            ref_h [N];

  coef_bank #(.N_TAPS(N), .C_W(CW)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .addr(addr), .coef(coef), .codes(codes));

  always #5 clk = ~clk;

  function automatic int decode(input grp_code_t c [NG]);
    int v = 0;
    for (int g = 0; g < NG; g++) begin
      int t;
      case (c[g].sel)
        MUL_X1:  t = 1;
        MUL_X3:  t = 3;
        MUL_X5:  t = 5;
        default: t = 0;
      endcase
      t = t * (1 << (int'(c[g].shift) + 3 * g));
      v += c[g].neg ? -t : t;
    end
    return v;
  endfunction

  task automatic check_all(input string when);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (decode(codes[k]) != ref_h[k]) begin
        failures++;
        if (failures < 10) $display("FAIL %s tap %0d: %0d expected %0d", when, k, decode(codes[k]), ref_h[k]);
      end
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) ref_h[k] = 0;
    #1 rst_n = 1'b0;   // falling edge: asynchronous reset
    #11 rst_n = 1'b1;
    @(negedge clk);
    check_all("after reset");
    for (int t = 0; t < 500; t++) begin
      we   = (t % 5 != 4);
      addr = 4'($urandom);
      case (t)
        0: coef = 16'h8000;
        1: coef = 16'h7fff;
        2: coef = 16'h5555;
        3: coef = 16'haaaa;
        default: coef = 16'($urandom);
      endcase
      @(posedge clk);
      if (we) ref_h[addr] = int'($signed(coef));
      @(negedge clk);
      check_all(we ? "write" : "idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
