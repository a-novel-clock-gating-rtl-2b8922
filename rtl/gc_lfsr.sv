// gc_lfsr -- low-power Fibonacci LFSR with per-stage transmission-gate clock gating.
//
// An N-stage Fibonacci (external-XOR) LFSR for the characteristic polynomial
// POLY. Stage k holds x^k; on every cycle each stage takes its left neighbour's
// bit and the last stage takes the feedback x^N. The serial output is x^0.
//
// Power is saved in two ways:
//  * Clock gating. A flip-flop without an enable needs a clock edge only when
//    its input differs from its output. Every stage (gc_stage) compares the two
//    with a pass-transistor XOR and passes CLK through a transmission gate only
//    when they differ, so on average only half of the flip-flops are clocked.
//  * Shared XORs. The comparison of stage k yields x^(k+1) xor x^k. The
//    feedback network (lfsr_feedback) uses it for every couple of adjacent taps,
//    saving one XOR per couple.
// The register produces exactly the sequence of an ungated LFSR: a stage that is
// not clocked would have loaded the value it already holds.
//
// Seeding: while `load` is high the stage inputs are the seed bits and every
// clock gate is held open, so the seed is in the register after the next
// rising edge. Opening all gates also leaves every gated clock node high, which
// the gates need: a node that floats low would turn the gate's next opening
// into a spurious rising edge. Load once after power-up, before relying on the
// output. Once `load` is low, state[k] advances as
// state[k] <= state[k+1], state[N-1] <= xor of the taps, one step per edge.
//
// Interface: clk; load, seed[N-1:0]; out = state[0]; state[N-1:0];
// clk_en[k] = 1 when stage k will be clocked at the next rising edge
// (its D differs from its Q, or load is high).
// Timing: load and seed must change only while clk is high (just after a
// rising edge), like the register's own outputs, so that no clock gate opens
// or closes while clk is low. There is no reset: the register holds an
// arbitrary value until the first load, and an all-zero seed locks it.
// The gated-clock structure, the clock gate and the XOR sharing follow the
// reference design; the seed load multiplexer, the load port, the gates' forced
// opening during load and the default polynomial choice are this design's own.
module gc_lfsr
  import lfsr_pkg::*;
#(
  parameter int unsigned N        = 16,
  parameter logic [N:0]  POLY     = 17'h1002D,  // x^16 + x^5 + x^3 + x^2 + 1
  parameter fb_style_e   FB_STYLE = FB_PAIRED
) (
  input  logic         clk,
  input  logic         load,
  input  logic [N-1:0] seed,
  output logic         out,
  output logic [N-1:0] state,
  output logic [N-1:0] clk_en
);

  logic [N-1:0] q, qn, d, d_n, bin, bin_n;
  logic         fb;

  for (genvar k = 0; k < N; k++) begin : g_stage
    if (k == N - 1) begin : g_last
      // The feedback has a single rail; its complement comes from an inverter.
      assign d[k]   = load ? seed[k] : fb;
      assign d_n[k] = ~d[k];
    end else begin : g_inner
      // Both rails of the neighbour come from its flip-flop.
      assign d[k]   = load ? seed[k]  : q[k+1];
      assign d_n[k] = load ? ~seed[k] : qn[k+1];
    end

    gc_stage u_stage (
      .clk  (clk),
      .d    (d[k]),
      .d_n  (d_n[k]),
      .open (load),
      .q    (q[k]),
      .qn   (qn[k]),
      .bin  (bin[k]),
      .bin_n(bin_n[k])
    );
  end

  lfsr_feedback #(
    .N       (N),
    .POLY    (POLY),
    .FB_STYLE(FB_STYLE)
  ) u_fb (
    .q  (q),
    .bin(bin[N-2:0]),
    .fb (fb)
  );

  assign out    = q[0];
  assign state  = q;
  assign clk_en = bin | {N{load}};

endmodule
