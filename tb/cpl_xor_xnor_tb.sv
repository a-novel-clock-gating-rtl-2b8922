// cpl_xor_xnor_tb -- exhaustive check of the dual-rail pass-transistor XOR/XNOR.
//
// For every combination of A and B, driven with proper complements, the
// outputs must be A xor B and A xnor B, and must be complementary.
module cpl_xor_xnor_tb;

  logic a, a_n, b, b_n, x, x_n;
  int unsigned checks = 0, failures = 0;

  cpl_xor_xnor dut (.a(a), .a_n(a_n), .b(b), .b_n(b_n), .x(x), .x_n(x_n));

  localparam logic [3:0] XOR_T = 4'b0110;  // index {a, b}

  initial begin
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 4; i++) begin
        {a, b} = 2'(i);
        a_n = ~a;
        b_n = ~b;
        #1;
        checks += 2;
        if (x !== XOR_T[i]) begin
          failures++;
          $display("FAIL xor a=%b b=%b x=%b", a, b, x);
        end
        if (x_n !== ~XOR_T[i]) begin
          failures++;
          $display("FAIL xnor a=%b b=%b x_n=%b", a, b, x_n);
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
