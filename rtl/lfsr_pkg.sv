// lfsr_pkg -- types and elaboration-time helpers shared by the gated-clock LFSR.
//
// A characteristic polynomial p(x) = x^N + c_(N-1) x^(N-1) + ... + c_1 x + 1 is
// carried as a packed vector whose bit k is the coefficient of x^k (bits N and 0
// are always 1). Register stage k holds the bit called x^k; the feedback network
// computes x^N, the input of stage N-1.
//
// The feedback can be built from two kinds of terms:
//   * flip-flop outputs x^k, k = 0..N-1;
//   * binomials b_k = x^(k+1) xor x^k, k = 0..N-2, which every stage's clock
//     gate already computes to decide whether the stage must be clocked.
// The functions below choose, for a polynomial and a feedback style, which terms
// are XORed together. They are evaluated only at elaboration.
//
//   FB_DIRECT   : every tap x^k taken from its flip-flop, n_t XOR gates
//                 (the conventional network, kept for comparison).
//   FB_BINOMIAL : x^a1 xor 1 and the sums x^a(2i+1) xor x^a(2i) of consecutive
//                 taps are built from runs of binomials (telescoping sums);
//                 the XOR count is the n'_t of the reduced-XOR method.
//   FB_PAIRED   : taps (x^0 included) are grouped into couples of adjacent
//                 exponents, each tap in one couple at most; a couple costs one
//                 binomial, a lone tap its flip-flop output. XOR count is
//                 n''_t = n_t - m_c, m_c the number of couples. This is the
//                 network the design uses by default.
// Couples are chosen greedily from the lowest exponent, which gives the largest
// number of couples along every run of adjacent taps. The choice of greedy
// order and the handling of an unpaired last tap in FB_BINOMIAL are this
// design's own; the counting rules follow the method.
package lfsr_pkg;

  typedef enum logic [1:0] {
    FB_DIRECT   = 2'd0,
    FB_BINOMIAL = 2'd1,
    FB_PAIRED   = 2'd2
  } fb_style_e;

  // Largest register length the helpers handle.
  localparam int unsigned MAX_N = 64;

  typedef logic [MAX_N:0]     poly_t;  // bit k = coefficient of x^k
  typedef logic [MAX_N-1:0]   mask_t;  // one bit per flip-flop or per binomial
  typedef logic [2*MAX_N-1:0] sel_t;   // interleaved: 2k = x^k, 2k+1 = b_k

  function automatic int unsigned popcount(sel_t v);
    int unsigned c = 0;
    for (int i = 0; i < 2 * MAX_N; i++) c += int'(v[i]);
    return c;
  endfunction

  // Number of set bits of v below position p (position of a term in the chain).
  function automatic int unsigned rank_below(sel_t v, int unsigned p);
    int unsigned c = 0;
    for (int unsigned i = 0; i < p; i++) c += int'(v[i]);
    return c;
  endfunction

  // Number of inner taps n_t (terms other than x^N and 1).
  function automatic int unsigned inner_taps(int unsigned n, poly_t poly);
    int unsigned c = 0;
    for (int unsigned k = 1; k < n; k++) c += int'(poly[k]);
    return c;
  endfunction

  // Interleaved term selection: bit 2k set = use x^k, bit 2k+1 set = use b_k.
  function automatic sel_t term_select(int unsigned n, poly_t poly, fb_style_e style);
    sel_t        sel = '0;
    int unsigned k;
    int unsigned lo;
    bit          have_lo;
    case (style)
      FB_DIRECT: begin
        for (k = 0; k < n; k++) if (poly[k]) sel[2*k] = 1'b1;
      end
      FB_PAIRED: begin
        k = 0;
        while (k < n) begin
          if (poly[k] && (k + 1 < n) && poly[k+1]) begin
            sel[2*k+1] = 1'b1;          // couple (x^(k+1), x^k) -> b_k
            k += 2;
          end else begin
            if (poly[k]) sel[2*k] = 1'b1;  // lone tap -> x^k
            k += 1;
          end
        end
      end
      default: begin  // FB_BINOMIAL
        // The constant term 1 pairs with the lowest inner tap a1; the remaining
        // inner taps pair in ascending order. Each pair (lo, hi) becomes the
        // run b_lo .. b_(hi-1), whose XOR telescopes to x^hi xor x^lo.
        lo      = 0;
        have_lo = 1'b1;
        for (k = 1; k < n; k++) begin
          if (poly[k]) begin
            if (have_lo) begin
              for (int unsigned j = lo; j < k; j++) sel[2*j+1] = 1'b1;
              have_lo = 1'b0;
            end else begin
              lo      = k;
              have_lo = 1'b1;
            end
          end
        end
        // An unpaired tap (x^N + 1 only, or an even number of terms) is used
        // directly from its flip-flop.
        if (have_lo) sel[2*lo] = 1'b1;
      end
    endcase
    return sel;
  endfunction

  // XOR gates of the feedback network for a polynomial and style.
  function automatic int unsigned feedback_xors(int unsigned n, poly_t poly, fb_style_e style);
    return popcount(term_select(n, poly, style)) - 1;
  endfunction

endpackage
