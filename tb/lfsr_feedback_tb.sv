// lfsr_feedback_tb -- checks the feedback network for all thirteen polynomials
// of the reduced-XOR comparison and all three network styles.
//
// For each polynomial and style, random register contents q are applied with
// the binomials bin[k] = q[k+1] ^ q[k] that the clock gates would supply, and
// fb must equal the XOR of the tapped bits. The number of XOR gates each
// network instantiates must equal the published counts: n_t for the
// conventional network, n'_t for the binomial-run network and n''_t for the
// paired network.
module lfsr_feedback_tb;
  import lfsr_pkg::*;

  localparam int NP = 13;
  // Polynomials, bit k = coefficient of x^k.
  localparam logic [16:0] POLYS [NP] = '{
    17'h00025,  // x^5 + x^2 + 1
    17'h0002F,  // x^5 + x^3 + x^2 + x + 1
    17'h00089,  // x^7 + x^3 + 1
    17'h0008F,  // x^7 + x^3 + x^2 + x + 1
    17'h000BF,  // x^7 + x^5 + x^4 + x^3 + x^2 + x + 1
    17'h00409,  // x^10 + x^3 + 1
    17'h0041B,  // x^10 + x^4 + x^3 + x + 1
    17'h0046F,  // x^10 + x^6 + x^5 + x^3 + x^2 + x + 1
    17'h004FF,  // x^10 + x^7 + ... + x + 1
    17'h1002D,  // x^16 + x^5 + x^3 + x^2 + 1
    17'h1003F,  // x^16 + x^5 + x^4 + x^3 + x^2 + x + 1
    17'h101BF,  // x^16 + x^8 + x^7 + x^5 + ... + x + 1
    17'h18BB7   // x^16 + x^15 + x^11 + x^9 + x^8 + x^7 + x^5 + x^4 + x^2 + x + 1
  };
  localparam int NS      [NP] = '{5, 5, 7, 7, 7, 10, 10, 10, 10, 16, 16, 16, 16};
  // Published XOR counts per style.
  localparam int XOR_NT  [NP] = '{1, 3, 1, 3, 5, 1, 3, 5, 7, 3, 5, 7, 9};
  localparam int XOR_NT1 [NP] = '{1, 1, 2, 1, 2, 2, 1, 2, 3, 3, 2, 3, 9};
  localparam int XOR_NT2 [NP] = '{1, 1, 1, 1, 2, 1, 1, 2, 3, 2, 2, 3, 6};
  localparam int VECTORS = 300;

  int unsigned checks = 0, failures = 0, finished = 0;

  task automatic check(bit ok, string what, int p, int s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s poly %0d style %0d", what, p, s);
    end
  endtask

  for (genvar p = 0; p < NP; p++) begin : g_poly
    localparam int N = NS[p];
    localparam logic [N:0] POLY = POLYS[p][N:0];

    logic [N-1:0] q;
    logic [N-2:0] bin;
    logic         fb_direct, fb_binomial, fb_paired;

    lfsr_feedback #(.N(N), .POLY(POLY), .FB_STYLE(FB_DIRECT))   u_direct   (.q(q), .bin(bin), .fb(fb_direct));
    lfsr_feedback #(.N(N), .POLY(POLY), .FB_STYLE(FB_BINOMIAL)) u_binomial (.q(q), .bin(bin), .fb(fb_binomial));
    lfsr_feedback #(.N(N), .POLY(POLY), .FB_STYLE(FB_PAIRED))   u_paired   (.q(q), .bin(bin), .fb(fb_paired));

    initial begin
      logic expect_fb;
      #1;
      check(u_direct.N_XOR   == XOR_NT[p],  "conventional XOR count n_t", p, 0);
      check(u_binomial.N_XOR == XOR_NT1[p], "binomial-run XOR count n'_t", p, 1);
      check(u_paired.N_XOR   == XOR_NT2[p], "paired XOR count n''_t", p, 2);
      for (int v = 0; v < VECTORS; v++) begin
        q = N'($urandom);
        for (int k = 0; k < N - 1; k++) bin[k] = q[k+1] ^ q[k];
        #1;
        expect_fb = 1'b0;
        for (int k = 0; k < N; k++) if (POLY[k]) expect_fb ^= q[k];
        check(fb_direct   == expect_fb, "conventional feedback", p, 0);
        check(fb_binomial == expect_fb, "binomial-run feedback", p, 1);
        check(fb_paired   == expect_fb, "paired feedback", p, 2);
      end
      finished++;
    end
  end

  initial begin
    wait (finished == NP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
