// clock_gate: latch-based integrated clock gating cell.
// The enable is captured by a latch that is transparent while clk is low, and
// the output clock is clk AND the latched enable, so gclk never glitches and
// only whole clock pulses pass. The latch is intended: it is the standard
// gating cell, and tools report it as a latch. The source uses clock gating to
// cut dynamic power; the cell structure is the conventional one.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  always_comb gclk = clk & en_lat;
endmodule
