// clock_gate: latch-based clock gating cell.
// A transparent latch, open while clk is low, holds the enable for the whole
// high phase; its output is ANDed with clk. An enable that changes while clk
// is high therefore cannot cut or lengthen a pulse of gclk. This is the
// latch style that was preferred over the plain OR/AND gate for
// safety-critical use. Timing: en must settle before the rising edge of clk;
// gclk then carries (or suppresses) exactly that clock pulse.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_latched;

  always_latch
    if (!clk) en_latched = en;

  assign gclk = clk & en_latched;
endmodule
