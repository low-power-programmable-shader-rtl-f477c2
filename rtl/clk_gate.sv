// clk_gate: integrated clock-gating cell for instruction-level gating inside
// the shader core.
//
// The enable is held in a latch that is transparent while the clock is low
// and is ANDed with the clock, so the gated clock delivers only whole high
// pulses and an enable that changes while the clock is high waits for the
// next cycle. Because the latch is transparent whenever the input clock is
// low, this cell is also correct when its input clock is itself gated and
// has been stopped: the enable is current at the first edge after a restart.
// The latch is the intended storage element of this cell.
// Timing: `en` must be settled before the rising edge it is meant to pass.
module clk_gate (
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
