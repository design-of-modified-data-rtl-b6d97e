// icg: integrated clock-gating cell, a level-sensitive latch followed by an AND
// gate.
//
// The latch is transparent while clk is low and holds while clk is high, so the
// enable seen by the AND gate cannot change during the high phase of the clock.
// This prevents glitches (clipped or extra pulses) on gclk when en settles late.
// gclk = clk & en_latched: a pulse of the free-running clock is passed on when
// en was 1 at the rising edge, and gclk stays low for the whole cycle otherwise.
//
// The latch + AND structure is the standard integrated clock gate named in the
// data-driven clock gating scheme. The latch is intended: it is the glitch
// filter of the cell, and tools report it as a latch for that reason.
//
// Timing: en must be stable before the rising edge of clk (setup to the latch
// closing). No reset is needed: while clk is low the latch follows en.
module icg (
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
