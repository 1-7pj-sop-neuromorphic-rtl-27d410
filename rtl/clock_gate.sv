// clock_gate: latch-based integrated clock gate.
//
// The enable is captured by a latch that is transparent while the clock is
// low, and the clock is ANDed with the latched enable, so the gated clock
// never glitches. The routers of an NPU run on this clock and hibernate when
// the NoC enable is low. The structure (enable latch, clock, AND) follows
// the document's clock-gating figure; the latch is intended and is the
// reason for the latch warning a linter may give on this module.
//
// Ports: clk in, en in (change it while clk is high or low; it takes effect
// from the next rising edge), gclk out.
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
