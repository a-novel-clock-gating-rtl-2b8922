// tg_clock_gate_tb -- checks the transmission-gate clock gate.
//
// The clock runs continuously; once per cycle, just after the rising edge
// (clk high), the gate is switched on or off at random, as the LFSR does.
// Checks: while the gate is on, clk_gated equals clk; while it is off,
// clk_gated holds the level it had when the gate opened, which is high here;
// the number of rising edges of clk_gated equals the number of cycles whose
// rising edge found the gate on. Both open and closed cycles must occur.
module tg_clock_gate_tb;

  logic clk = 1'b0;
  logic on, on_n, clk_gated;
  int unsigned checks = 0, failures = 0;
  int unsigned edges = 0, expected = 0, n_on = 0, n_off = 0;

  tg_clock_gate dut (.clk(clk), .on(on), .on_n(on_n), .clk_gated(clk_gated));

  always #5 clk = ~clk;
  always @(posedge clk_gated) edges++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    // Open the gate for one cycle so the node starts from a known level.
    on = 1'b1; on_n = 1'b0;
    @(posedge clk); #1;
    @(posedge clk); #1;
    edges = 0;
    for (int i = 0; i < 500; i++) begin
      on   = 1'($urandom);
      on_n = ~on;
      #1;
      check(clk_gated == 1'b1, "node high just after the edge");
      @(negedge clk); #1;
      if (on) begin
        check(clk_gated == 1'b0, "follows clk low while on");
        n_on++;
      end else begin
        check(clk_gated == 1'b1, "holds high while off");
        n_off++;
      end
      if (on) expected++;
      @(posedge clk); #1;
      check(edges == expected, "one gated edge per open cycle");
    end
    check(n_on > 0 && n_off > 0, "both open and closed cycles occurred");
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
