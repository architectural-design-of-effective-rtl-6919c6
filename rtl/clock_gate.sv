// clock_gate: integrated clock-gating cell (latch + AND).
// The enable is captured by a latch that is transparent while clk is low, so the
// gated clock gclk = clk & en_latched can only rise together with clk and never
// glitches. This is the standard ICG structure; the latch reported by lint is
// intentional and is the reason the cell exists.
// Interface: clk, en in; gclk out. Timing: en must be stable before the rising edge
// of clk; gclk pulses high for the high phase of clk when en was 1.
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
