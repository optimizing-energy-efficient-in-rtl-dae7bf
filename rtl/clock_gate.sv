// clock_gate: latch-based clock gate.
//
// A level-sensitive latch, transparent while clk is low, holds the enable;
// an AND gate of clk and the latched enable gives gclk. Because the latch is
// closed for the whole high phase of clk, a change of en while clk is high
// cannot cut or create a pulse: gclk either copies a full clk pulse or stays
// low. Registers clocked by gclk only see the edges of cycles whose enable
// was high before clk rose.
//
// Interface: clk (system clock), en (enable, to be settled before the
// rising edge), gclk (gated clock, in phase with clk).
//
// The latch-plus-AND structure is the one the filter's design describes for
// its power saving; the low-transparent latch polarity is this design's
// choice, the usual one for an AND-type gate. The latch is intended: it is
// the circuit, not a coding slip.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en;
  end

  assign gclk = clk & en_latched;

endmodule
