// tb_delay_line: checks the time delay unit at its default size.
//
// After reset every stage must read zero. Random words are then clocked in;
// a reference history kept by the test bench must match taps[k] = the word
// entered k+1 edges ago, for every stage after every edge.
module tb_delay_line;
  localparam int unsigned N = fir_pkg::DEF_N_TAPS;
  localparam int unsigned W = 3 * (fir_pkg::DEF_X_W + 3);
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [W-1:0] din = '0;
  logic [W-1:0] taps [N];
  logic [W-1:0] hist [N];

  delay_line dut (.clk(clk), .rst_n(rst_n), .din(din), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) hist[k] = '0;
    #1 rst_n = 1'b0;   // falling edge: asynchronous reset
    #11 rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        checks++;
        if (taps[k] !== hist[k]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d stage %0d", t, k);
        end
      end
      din = {$urandom, $urandom};
      @(posedge clk);
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
