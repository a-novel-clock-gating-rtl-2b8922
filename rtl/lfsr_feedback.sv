// lfsr_feedback -- feedback XOR network of the gated-clock LFSR.
//
// Computes x^N = sum over the taps of x^k (mod 2) for the characteristic
// polynomial POLY. Besides the flip-flop outputs x^k it receives the binomials
// b_k = x^(k+1) xor x^k that the stages' clock gates compute anyway. A couple of
// adjacent taps then costs one binomial instead of two flip-flop outputs and
// one XOR, so the network needs n''_t = n_t - m_c two-input XOR gates, where n_t
// is the number of inner taps and m_c the number of couples of adjacent taps
// (the constant term 1 = x^0 included, each tap in one couple at most).
//
// The terms are chosen at elaboration (lfsr_pkg::term_select) and XORed by a
// chain of xor2_cell gates from the lowest exponent upwards, like the
// feedback chain of a Fibonacci LFSR. FB_STYLE selects the paired network
// (default), the binomial-run network or the conventional one; N_XOR is the
// resulting gate count.
//
// Interface: q[k] = x^k (k = 0..N-1), bin[k] = x^(k+1) xor x^k (k = 0..N-2),
// fb = x^N. Purely combinational.
// The term-sharing rules follow the reduced-XOR method; the greedy choice of
// couples and the chain order are this design's own.
module lfsr_feedback
  import lfsr_pkg::*;
#(
  parameter int unsigned N        = 16,
  parameter logic [N:0]  POLY     = 17'h1002D,  // x^16 + x^5 + x^3 + x^2 + 1
  parameter fb_style_e   FB_STYLE = FB_PAIRED
) (
  input  logic [N-1:0] q,
  input  logic [N-2:0] bin,
  output logic         fb
);

  localparam sel_t        SEL     = term_select(N, poly_t'(POLY), FB_STYLE);
  localparam int unsigned N_TERMS = popcount(SEL);
  localparam int unsigned N_XOR   = N_TERMS - 1;
  localparam int unsigned W       = 2 * N - 1;

  // Interleaved candidates: 2k = x^k, 2k+1 = b_k.
  logic [W-1:0]       cand;
  logic [N_TERMS-1:0] term;
  logic [N_TERMS-1:0] chain;

  for (genvar k = 0; k < N; k++) begin : g_cand
    assign cand[2*k] = q[k];
    if (k < N - 1) begin : g_bin
      assign cand[2*k+1] = bin[k];
    end
  end

  for (genvar p = 0; p < W; p++) begin : g_pick
    if (SEL[p]) begin : g_use
      assign term[rank_below(SEL, p)] = cand[p];
    end
  end

  assign chain[0] = term[0];
  for (genvar t = 1; t < N_TERMS; t++) begin : g_xor
    xor2_cell u_xor (
      .a(chain[t-1]),
      .b(term[t]),
      .y(chain[t])
    );
  end

  assign fb = chain[N_TERMS-1];

  initial begin
    assert (N >= 2 && N <= MAX_N) else $fatal(1, "lfsr_feedback: N out of range");
    assert (POLY[N] && POLY[0]) else $fatal(1, "lfsr_feedback: POLY needs x^N and 1");
  end

endmodule
