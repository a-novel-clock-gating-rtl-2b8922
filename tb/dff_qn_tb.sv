// dff_qn_tb -- checks the flip-flop takes D at the rising edge only.
//
// D is changed at random both while the clock is high and while it is low;
// after every rising edge Q must equal the D present just before that edge,
// and Q must not move in between. QN must always be the complement of Q.
module dff_qn_tb;

  logic clk = 1'b0;
  logic d, q, qn;
  int unsigned checks = 0, failures = 0;

  dff_qn dut (.clk(clk), .d(d), .q(q), .qn(qn));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic expect_q;

  initial begin
    d = 1'b0;
    for (int i = 0; i < 400; i++) begin
      d = 1'($urandom);
      #4;
      expect_q = d;
      clk = 1'b1;           // rising edge
      #1;
      check(q == expect_q, "q takes d at the rising edge");
      check(qn == ~q, "qn is the complement of q");
      d = ~d;               // change while clk high
      #2;
      check(q == expect_q, "q holds while clk is high");
      clk = 1'b0;           // falling edge
      d = 1'($urandom);
      #3;
      check(q == expect_q, "q holds across the falling edge");
    end
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
