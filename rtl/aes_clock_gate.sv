// aes_clock_gate -- latch-based clock-gating cell.
//
// The processor switches off the clocks of its register banks (State-Register,
// MixColumns registers, Key-Register, round constant) whenever they have
// nothing to do, to save dynamic power. This cell is the gate: en is
// captured by a latch that is transparent while clk is low, and the latched
// value is ANDed with clk, so gclk carries only whole clock pulses and an
// enable that changes after a rising edge takes effect from the next one.
// The latch is intended; it is what keeps gclk free of glitches. The cell
// style is this design's choice: the published design only says clock gating is used.
//
// Interface: clk (free-running), en (enable, sampled while clk is low),
// gclk (gated clock).
module aes_clock_gate (
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
