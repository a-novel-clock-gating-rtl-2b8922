// xornand_pa_tb -- checks the power-aware XOR-controlled clock gate.
//
// A and B (with complements) and the open control are changed at random just
// after each rising clock edge. Checks: x = a ^ b and x_n = ~x; the gated
// clock gives a rising edge exactly in the cycles where a != b or open = 1,
// and stays high otherwise. Counts how many cycles were clocked because the
// inputs differed, because of open, and gated; each must occur.
module xornand_pa_tb;

  logic clk = 1'b0;
  logic a, a_n, b, b_n, open, clk_gated, x, x_n;
  int unsigned checks = 0, failures = 0;
  int unsigned edges = 0, expected = 0, n_diff = 0, n_open = 0, n_gated = 0;

  xornand_pa dut (
    .clk(clk), .a(a), .a_n(a_n), .b(b), .b_n(b_n), .open(open),
    .clk_gated(clk_gated), .x(x), .x_n(x_n)
  );

  always #5 clk = ~clk;
  always @(posedge clk_gated) edges++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bit enabled;

  initial begin
    a = 1'b0; a_n = 1'b1; b = 1'b0; b_n = 1'b1; open = 1'b1;
    @(posedge clk); #1;
    @(posedge clk); #1;
    edges = 0;
    for (int i = 0; i < 600; i++) begin
      a = 1'($urandom); a_n = ~a;
      b = 1'($urandom); b_n = ~b;
      open = ($urandom % 5) == 0;
      #1;
      check(x == (a != b), "x is a xor b");
      check(x_n == ~x, "x_n is the complement");
      enabled = (a != b) || open;
      if (a != b) n_diff++;
      else if (open) n_open++;
      else n_gated++;
      if (enabled) expected++;
      @(negedge clk); #1;
      check(clk_gated == !enabled, "gated clock low only when enabled");
      @(posedge clk); #1;
      check(edges == expected, "edge count");
    end
    check(n_diff > 0 && n_open > 0 && n_gated > 0, "all gate cases occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
