// tg_clock_gate -- transmission-gate clock gate (the "TG-MUX" of the clock gate).
//
// A single transmission gate between CLK and CLK_GATED. Its nMOS is driven by
// `on` and its pMOS by `on_n`, so the gate conducts when on = 1 / on_n = 0 and
// CLK_GATED then follows CLK. When it is off, nothing drives CLK_GATED and the
// node keeps, on its capacitance, the level it had when the gate opened.
//
// That storage is written here as a level-sensitive latch: transparent while the
// gate conducts, holding otherwise. The latch is intended; it is the behaviour
// of the floating clock node, not an inferred accident. It is what makes the
// gate glitch-free in the LFSR: the control changes only just after a rising
// clock edge, while CLK is high, so the node is left high when the gate opens
// and no rising edge reaches the flip-flop until the gate closes again and CLK
// next rises.
//
// Interface: clk, on, on_n (complementary pair) -> clk_gated.
// Timing: `on` must change only while clk is high. Holding the floating level
// as a latch is this design's model; the transistor arrangement follows the
// reference schematic.
module tg_clock_gate (
  input  logic clk,
  input  logic on,
  input  logic on_n,
  output logic clk_gated
);

  // Either device conducting connects the two nodes.
  always_latch begin
    if (on || !on_n) clk_gated = clk;
  end

endmodule
