// tb_clock_gate: checks the latch-based clock gate.
//
// The enable is changed at random both while clk is low (where the latch is
// open and the change must decide the next pulse) and while clk is high
// (where it must have no effect). After every rising edge gclk must equal
// the enable set during the preceding low phase, it must keep that value
// through the high phase, and it must be low while clk is low. The number
// of gclk pulses is compared with the number of enabled cycles.
module tb_clock_gate;
  logic clk = 1'b0;
  logic en  = 1'b0;
  logic gclk;
  int   checks = 0, failures = 0;
  int   pulses = 0, expected_pulses = 0;
  logic exp_g;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always #5 clk = ~clk;
  always @(posedge gclk) pulses++;

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: gclk=%0b expected %0b at %0t", what, got, want, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      #1 check(gclk, 1'b0, "low phase");
      #1 en = 1'($urandom);
      exp_g = en;
      if (exp_g) expected_pulses++;
      @(posedge clk);
      #1 check(gclk, exp_g, "after rising edge");
      #1 en = 1'($urandom);          // change during the high phase
      #1 check(gclk, exp_g, "enable change while high");
    end
    @(negedge clk);
    checks++;
    if (pulses != expected_pulses) begin
      failures++;
      $display("FAIL pulse count %0d expected %0d", pulses, expected_pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
