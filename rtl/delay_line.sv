// delay_line: the filter's time delay unit.
//
// A chain of N_TAPS registers of W bits. On every rising edge of clk the new
// word din enters stage 0 and each stage passes its word to the next, so
// taps[k] holds the word of the k-th most recent sample: x[n-k] for the
// direct-form filter. In the filter, clk is a gated clock that only pulses
// for cycles carrying a valid sample, so the line advances once per sample
// and is frozen, drawing no clock power, in between. Reset clears every
// stage to zero, so outputs before the line is full are those of a filter
// fed zeros.
//
// Interface: clk, rst_n (asynchronous, active low), din, taps[0..N_TAPS-1].
// Timing: din appears on taps[0] after one edge, on taps[k] after k+1 edges.
//
// The chain of unit delays is the document's; carrying precomputed multiples
// instead of the raw sample is this design's choice (see precomputer).
module delay_line #(
  parameter int unsigned N_TAPS = fir_pkg::DEF_N_TAPS,
  parameter int unsigned W      = 3 * (fir_pkg::DEF_X_W + 3)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] taps [N_TAPS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < N_TAPS; k++) taps[k] <= '0;
    end else begin
      taps[0] <= din;
      for (int unsigned k = 1; k < N_TAPS; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
