// gc_lfsr_table_tb -- runs the gated-clock LFSR for all thirteen polynomials of
// the power comparison (orders 5, 7, 10 and 16) through one full period each,
// with each of the three feedback networks (paired, binomial-run, conventional).
//
// Every register is seeded with 1 and stepped until it returns to 1. On each
// step its state is compared with a plain shift-register model. At the end of
// the period the test checks that
//  * the period is 2^n - 1 (all thirteen polynomials are maximal-length);
//  * each stage's gated clock rose exactly 2^(n-1) times, the number of runs in
//    a maximal-length sequence, i.e. a switching activity of one half, and
//    exactly once per cycle its gate was enabled;
//  * the feedback network has its published XOR count (n''_t, n'_t or n_t).
// A summary line per register gives the clocked fraction and the XOR count.
module gc_lfsr_table_tb;
  import lfsr_pkg::*;

  localparam int NP = 13;
  localparam logic [16:0] POLYS [NP] = '{
    17'h00025, 17'h0002F, 17'h00089, 17'h0008F, 17'h000BF,
    17'h00409, 17'h0041B, 17'h0046F, 17'h004FF,
    17'h1002D, 17'h1003F, 17'h101BF, 17'h18BB7
  };
  localparam int NS      [NP] = '{5, 5, 7, 7, 7, 10, 10, 10, 10, 16, 16, 16, 16};
  localparam int NSTYLE = 3;
  localparam fb_style_e STYLES [NSTYLE] = '{FB_PAIRED, FB_BINOMIAL, FB_DIRECT};
  // Published XOR counts, per style in the order above.
  localparam int XORS [NSTYLE][NP] = '{
    '{1, 1, 1, 1, 2, 1, 1, 2, 3, 2, 2, 3, 6},   // n''_t
    '{1, 1, 2, 1, 2, 2, 1, 2, 3, 3, 2, 3, 9},   // n'_t
    '{1, 3, 1, 3, 5, 1, 3, 5, 7, 3, 5, 7, 9}    // n_t
  };

  logic clk = 1'b0;
  logic load;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0, finished = 0;

  task automatic check(bit ok, string what, int p);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s poly %0d at %0t", what, p, $time);
    end
  endtask

  for (genvar st = 0; st < NSTYLE; st++) begin : g_style
  for (genvar p = 0; p < NP; p++) begin : g_poly
    localparam int N = NS[p];
    localparam logic [N:0] POLY = POLYS[p][N:0];

    logic [N-1:0] state, clk_en;
    logic         out;
    int unsigned  edges [N];

    gc_lfsr #(.N(N), .POLY(POLY), .FB_STYLE(STYLES[st])) dut (
      .clk(clk), .load(load), .seed(N'(1)),
      .out(out), .state(state), .clk_en(clk_en)
    );

    for (genvar k = 0; k < N; k++) begin : g_mon
      always @(posedge dut.g_stage[k].u_stage.clk_gated) edges[k]++;
    end

    initial begin
      logic [N-1:0] model;
      int unsigned  period, expected [N], total;
      // Wait for the seed, then clear the edge counters.
      @(negedge load);
      #1;
      check(state == N'(1), "seeded", p);
      for (int k = 0; k < N; k++) begin edges[k] = 0; expected[k] = 0; end
      model  = state;
      period = 0;
      do begin
        @(negedge clk);
        for (int k = 0; k < N; k++) if (clk_en[k]) expected[k]++;
        @(posedge clk);
        #1;
        model = {^(model & POLY[N-1:0]), model[N-1:1]};
        period++;
        check(state == model, "state matches model", p);
      end while (state != N'(1) && period <= (1 << N));
      check(period == (1 << N) - 1, "maximal period", p);
      total = 0;
      for (int k = 0; k < N; k++) begin
        check(edges[k] == expected[k], "edges equal enabled cycles", p);
        check(edges[k] == (1 << (N - 1)), "2^(n-1) clock edges per period", p);
        total += edges[k];
      end
      check(dut.u_fb.N_XOR == XORS[st][p], "feedback XOR count", p);
      $display("%-11s poly %2d  n=%2d  period=%5d  clocked fraction=%0.4f  feedback XORs=%0d",
               STYLES[st].name(), p, N, period, real'(total) / real'(N * period), dut.u_fb.N_XOR);
      finished++;
    end
  end
  end

  initial begin
    load = 1'b1;
    @(posedge clk); #1;
    @(posedge clk); #1;
    load = 1'b0;
    wait (finished == NP * NSTYLE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
