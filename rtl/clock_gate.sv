// clock_gate: one integrated clock-gating cell (latch + AND).
//
// The clock gating circuit of the pattern generator gives every LFSR
// flip-flop its own gated clock; this cell is one of those outputs. The enable
// is captured by a level-sensitive latch that is transparent while clk is low,
// so the enable seen by the AND gate is frozen during the high phase and the
// gated clock cannot glitch. gclk = clk & en_latched.
//
// Timing: en must be stable before the rising edge of clk; the rising edge of
// gclk then coincides with that of clk in the cycle where en was high, and no
// edge appears in a cycle where en was low. The latch is intentional: it is
// what makes the gate glitch-free, so the latch warning for en_q stands.
// The latch-based cell is this design's choice; the document only asks that
// the clock of a stage be gated when it would not change.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_q;

  always_latch begin
    if (!clk) en_q = en;
  end

  assign gclk = clk & en_q;
endmodule
