// clock_gate: latch-based integrated clock gate for one FU or FU stage.
//
// The enable is captured by a latch that is transparent while clk is low
// and held while clk is high, so a change of en during the high phase
// cannot glitch the gated clock. gclk = clk AND latched enable: a gated
// unit sees no clock edge, its registers do not toggle and (apart from
// leakage) it draws no current, which is the "quiet" state the current
// surge analysis is built on. en must be valid before the rising edge of
// the cycle in which the unit is to be clocked.
//
// The original design assumes deterministic clock gating of every integer FU;
// the latch-and-AND form is the usual standard-cell structure and this
// design's choice.
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
