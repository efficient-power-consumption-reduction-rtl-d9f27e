// clock_gate: gated clock for the encoder's registers. The gated clock is
// the AND of clk and the load enable, so the registers it drives see a rising
// edge only in cycles where a new flit is loaded and stay idle otherwise.
// The enable is held in a latch that is transparent while clk is low, so
// that a change of enable during the high phase of clk cannot cut or create a
// clock pulse: the latch is this implementation's choice (the AND is the
// design's). Timing: en must be valid before the rising edge of clk; gclk
// then pulses high for that whole high phase. The one latch of this module
// is intended: it is the enable latch of the clock gate.
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
