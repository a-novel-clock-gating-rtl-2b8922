// gc_stage -- one LFSR stage: flip-flop plus its own power-aware clock gate.
//
// The stage holds x^i. Its input D is the neighbouring bit x^(i+1) (or the
// feedback x^N for the last stage, or a seed bit while loading). A flip-flop
// without an enable only needs a clock edge when D differs from Q, so the clock
// gate (xornand_pa) compares D with Q and lets CLK through only then. In a
// maximal-length LFSR that is about half of the cycles, which removes about half
// of the clock activity of the register.
//
// The comparison is done on dual rails: D with D_N from the caller, Q with the
// flip-flop's own QN. Its result, x^(i+1) xor x^i, is also an output (bin,
// bin_n) for reuse by the feedback network.
//
// Input open forces the gate on (used while seeding, see xornand_pa).
//
// Interface: clk; d/d_n complementary; open; q, qn; bin = d ^ q, bin_n = ~bin.
// The stage is clocked at the next rising edge when bin | open.
// Timing: d must change only while clk is high, i.e. just after a rising edge,
// as it does when it comes from other stages of the register.
// Structure follows the reference gated-clock LFSR stage with the
// transmission-gate clock gate.
module gc_stage (
  input  logic clk,
  input  logic d,
  input  logic d_n,
  input  logic open,
  output logic q,
  output logic qn,
  output logic bin,
  output logic bin_n
);

  logic clk_gated;

  xornand_pa u_gate (
    .clk      (clk),
    .a        (d),
    .a_n      (d_n),
    .b        (q),
    .b_n      (qn),
    .open     (open),
    .clk_gated(clk_gated),
    .x        (bin),
    .x_n      (bin_n)
  );

  dff_qn u_ff (
    .clk(clk_gated),
    .d  (d),
    .q  (q),
    .qn (qn)
  );

endmodule
