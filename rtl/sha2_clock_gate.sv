// sha2_clock_gate: latch-based clock gate for the SHA-2 round datapath.
//
// The enable is captured by a level-sensitive latch that is transparent while
// the clock is low, and the gated clock is the AND of the clock and the
// latched enable. Because the latch is closed while the clock is high, a
// change of the enable during the high phase cannot cut or create a clock
// pulse: the gated clock carries whole pulses only. The latch is the purpose
// of this module (the usual integrated clock-gating cell) and is intended.
//
// Timing: en must be settled before the rising clock edge of the cycle it
// enables; that edge then appears on gclk. test_en forces the clock on (scan
// or test use).
//
// Latch-based clock gating is the low-power technique the design calls for;
// the cell structure and the test_en input are choices of this implementation.
module sha2_clock_gate (
  input  logic clk,
  input  logic en,
  input  logic test_en,
  output logic gclk
);

  logic en_latched;

  always_latch begin
    if (!clk) en_latched = en || test_en;
  end

  assign gclk = clk && en_latched;

endmodule
