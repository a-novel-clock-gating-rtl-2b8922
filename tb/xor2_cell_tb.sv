// xor2_cell_tb -- exhaustive check of the two-input XOR gate.
module xor2_cell_tb;

  logic a, b, y;
  int unsigned checks = 0, failures = 0;

  xor2_cell dut (.a(a), .b(b), .y(y));

  // Truth table written out: index {a, b}.
  localparam logic [3:0] TRUTH = 4'b0110;

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 4; i++) begin
        {a, b} = 2'(i);
        #1;
        checks++;
        if (y !== TRUTH[i]) begin
          failures++;
          $display("FAIL a=%b b=%b y=%b", a, b, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
