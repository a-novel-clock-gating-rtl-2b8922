// gc_stage_tb -- checks one gated-clock LFSR stage.
//
// D (with its complement) changes at random just after each rising edge,
// sometimes equal to Q and sometimes not. Checks: after each edge Q equals the
// D seen before it (a stage whose gate stayed shut already held that value);
// bin = d ^ q before the edge; the stage's gated clock rises exactly in the
// cycles where D differed from Q or open was high. Counts clocked and gated
// cycles; both must occur.
module gc_stage_tb;

  logic clk = 1'b0;
  logic d, d_n, open, q, qn, bin, bin_n;
  int unsigned checks = 0, failures = 0;
  int unsigned edges = 0, expected = 0, n_clocked = 0, n_gated = 0;

  gc_stage dut (
    .clk(clk), .d(d), .d_n(d_n), .open(open),
    .q(q), .qn(qn), .bin(bin), .bin_n(bin_n)
  );

  always #5 clk = ~clk;
  always @(posedge dut.clk_gated) edges++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic d_before;

  initial begin
    // Initialise through open, as the register's load does.
    d = 1'b0; d_n = 1'b1; open = 1'b1;
    @(posedge clk); #1;
    open = 1'b0;
    check(q == 1'b0, "initialised through open");
    edges = 0;
    for (int i = 0; i < 800; i++) begin
      d   = 1'($urandom);
      d_n = ~d;
      #1;
      check(bin == (d ^ q), "bin is d xor q");
      check(bin_n == ~bin, "bin_n complement");
      check(qn == ~q, "qn complement");
      d_before = d;
      if (d != q) begin expected++; n_clocked++; end
      else n_gated++;
      @(posedge clk); #1;
      check(q == d_before, "q takes d");
      check(edges == expected, "clocked only when d differs from q");
    end
    check(n_clocked > 0 && n_gated > 0, "clocked and gated cycles occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
