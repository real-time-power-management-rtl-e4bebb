// clock_gate: integrated clock-gating cell used to stop the clock of an
// inactive PE-core.
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the gated clock is the AND of the clock and the latched enable, so
// an enable change in the middle of a high phase cannot cut a pulse short.
// The prototype deactivates idle cores by clock gating; the latch-and-AND
// form is the usual standard-cell structure and this design's choice.
//
// Interface: clk, en (sampled during the low phase), gclk. The latch is the
// intended circuit of this cell.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;
endmodule
