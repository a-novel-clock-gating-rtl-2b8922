// xornand_pa -- power-aware XOR-controlled clock gate ("XORNAND" cell).
//
// The per-stage clock gate of the LFSR. A complementary pass-transistor
// XOR/XNOR (cpl_xor_xnor) compares the two dual-rail inputs; its two outputs,
// already complementary and of full swing at the transmission-gate controls,
// drive a transmission gate (tg_clock_gate) that passes CLK when A differs
// from B. No static gate stage is spent on the clock path, which is where this
// cell saves power over an XOR followed by a NAND.
//
// The XOR result is also brought out (x, x_n): in the LFSR it is the binomial
// x^(i+1) xor x^i that the feedback network reuses instead of spending its own
// XOR gate.
//
// A second control, open, forces the gate to conduct whatever the inputs. It is
// used while the register is being seeded: every clock node then follows CLK
// and is left high when open falls, so no gate can hold a stale low level that
// would turn its next opening into a spurious rising edge.
//
// Interface: clk; a/a_n, b/b_n complementary pairs; open; clk_gated = clk while
// a != b or open = 1, otherwise holds; x = a ^ b, x_n = ~x.
// Timing: a, b and open must change only while clk is high (see tg_clock_gate).
// The CPL XOR/XNOR driving a transmission gate follows the reference schematic;
// the open control (a transmission gate in parallel) is this design's own.
module xornand_pa (
  input  logic clk,
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  input  logic open,
  output logic clk_gated,
  output logic x,
  output logic x_n
);

  cpl_xor_xnor u_cpl (
    .a  (a),
    .a_n(a_n),
    .b  (b),
    .b_n(b_n),
    .x  (x),
    .x_n(x_n)
  );

  logic on, on_n;

  always_comb begin
    on   = x | open;
    on_n = x_n & ~open;
  end

  tg_clock_gate u_tg (
    .clk      (clk),
    .on       (on),
    .on_n     (on_n),
    .clk_gated(clk_gated)
  );

endmodule
