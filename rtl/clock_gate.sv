// clock_gate: glitch-free clock gate for the high-power section. The enable is
// captured by a latch that is transparent while clk is low, and the gated
// clock is clk AND the latched enable, so gclk only ever shows whole high
// pulses: a change of en takes effect from the next rising edge of clk. The
// document says that no clock reaches the transceiver manager while it is
// unused; the latch-and-AND cell is this design's way of doing it (an ASIC
// flow would map it onto an integrated clock-gating cell). The latch is
// intended: it is the standard structure of such a cell.
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
