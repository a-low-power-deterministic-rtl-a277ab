// clock_gate: glitch-free clock gate (latch plus AND).
//
// The enable is captured by a latch that is transparent while clk is low and
// held while clk is high, and gclk = clk & latched enable. An enable that
// changes during the high phase therefore cannot chop a clock pulse. This is
// the usual integrated clock-gating cell; the choice of a latch-based gate
// over a bare AND gate is this design's own.
//
// Interface: clk in, en in, gclk out. gclk follows clk with no cycle delay;
// en must settle before clk rises.
//
// The latch reported by lint is intentional: it is the gating cell's latch.
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
