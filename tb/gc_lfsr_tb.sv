// gc_lfsr_tb -- end-to-end test of the gated-clock LFSR at its default size.
//
// Runs the 16-stage register with x^16 + x^5 + x^3 + x^2 + 1 through one whole
// period (2^16 - 1 steps) and compares every state with a plain shift-register
// model written here from the polynomial. It also checks:
//  * the seed is in the register one rising edge after load;
//  * the period is exactly 65535 and the register returns to its seed;
//  * every stage's gated clock rose exactly once for each cycle its gate was
//    enabled, and never otherwise (no lost or spurious edges);
//  * over one period each stage is clocked 2^15 times: the register holds a
//    maximal-length sequence, whose 2^15 runs each end in one transition;
//  * the feedback network uses n''_t = 2 XOR gates instead of n_t = 3;
//  * a reload in the middle of a run restarts the sequence.
// Mechanisms counted: seed loads, clocked and gated stage-cycles, and the
// sharing of a binomial in the feedback network; each must occur.
module gc_lfsr_tb;

  localparam int N      = 16;
  localparam int PERIOD = (1 << N) - 1;
  localparam logic [N-1:0] TAPS = 16'h002D;  // x^5, x^3, x^2, 1

  logic         clk = 1'b0;
  logic         load;
  logic [N-1:0] seed;
  logic         out;
  logic [N-1:0] state;
  logic [N-1:0] clk_en;

  gc_lfsr dut (
    .clk   (clk),
    .load  (load),
    .seed  (seed),
    .out   (out),
    .state (state),
    .clk_en(clk_en)
  );

  always #5 clk = ~clk;

  int unsigned checks   = 0;
  int unsigned failures = 0;
  int unsigned n_loads = 0, n_clocked = 0, n_gated = 0;
  int unsigned edges    [N];
  int unsigned expected [N];

  // Count the rising edges that actually reach each flip-flop.
  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(posedge dut.g_stage[k].u_stage.clk_gated) edges[k]++;
  end

  function automatic logic [N-1:0] ref_step(logic [N-1:0] s);
    return {^(s & TAPS), s[N-1:1]};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t state=%h model=%h en=%h", what, $time, state, model, clk_en);
    end
  endtask

  // One clock step: the gate enables are recorded while clk is low, then the
  // edge is taken; inputs change 1 time unit after the edge (clk high).
  task automatic step();
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      if (clk_en[k]) begin expected[k]++; n_clocked++; end
      else n_gated++;
    end
    @(posedge clk);
    #1;
  endtask

  task automatic do_load(logic [N-1:0] s);
    seed = s;
    load = 1'b1;
    step();
    load = 1'b0;
    n_loads++;
    check(state == s, "seed loaded after one edge");
    check(out == s[0], "serial output is x^0");
  endtask

  logic [N-1:0] model;
  logic [N-1:0] s0;
  int unsigned  period;
  int unsigned  ref_edges [N];

  initial begin
    load = 1'b0;
    seed = '0;
    @(posedge clk);
    #1;
    // The register and the clock nodes start at arbitrary values; one load
    // sets both.
    do_load(16'hACE1);
    for (int k = 0; k < N; k++) begin edges[k] = 0; expected[k] = 0; end

    check(dut.u_fb.N_XOR == 2, "feedback uses n''_t = 2 XOR gates");

    // One whole period, state by state.
    s0     = state;
    model  = state;
    period = 0;
    do begin
      step();
      model = ref_step(model);
      period++;
      check(state == model, "state matches reference LFSR");
      check(out == model[0], "serial output");
    end while (state != s0 && period < PERIOD + 2);
    check(period == PERIOD, "maximal period 2^16-1");
    for (int k = 0; k < N; k++) begin
      check(edges[k] == expected[k], "gated clock edges equal enabled cycles");
      check(edges[k] == (1 << (N - 1)), "stage clocked 2^15 times per period");
      ref_edges[k] = edges[k];
    end

    // Reload in the middle of a run and follow the new sequence.
    repeat (37) step();
    do_load(16'h1234);
    model = 16'h1234;
    repeat (500) begin
      step();
      model = ref_step(model);
      check(state == model, "sequence after reload");
    end

    check(n_loads > 0, "seed load happened");
    check(n_clocked > 0, "clocked stage-cycles happened");
    check(n_gated > 0, "gated stage-cycles happened");
    $display("loads=%0d clocked=%0d gated=%0d clocked_fraction=%0.3f",
             n_loads, n_clocked, n_gated, real'(n_clocked) / real'(n_clocked + n_gated));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
