// cpl_xor_xnor -- complementary pass-transistor XOR/XNOR.
//
// Dual-rail in, dual-rail out. Four nMOS pass devices steer the true or the
// complementary copy of A onto two output nodes; the gates of the devices are B
// and B_N:
//   x_n (A xnor B) receives A   through the device gated by B,
//                  and A_N through the device gated by B_N;
//   x   (A xor  B) receives A_N through the device gated by B,
//                  and A   through the device gated by B_N.
// Each node is therefore a 2:1 selection by B, which is how it is written here.
// In silicon the nMOS-only paths give a weak '1'; that is acceptable because the
// outputs only drive the gates of a transmission gate (and, through the
// feedback network's XOR cells, are re-buffered before reaching a flip-flop).
//
// Interface: a/a_n and b/b_n must be complementary pairs; x = a ^ b, x_n = ~x.
// Purely combinational. The device arrangement follows the reference schematic.
module cpl_xor_xnor (
  input  logic a,
  input  logic a_n,
  input  logic b,
  input  logic b_n,
  output logic x,
  output logic x_n
);

  always_comb begin
    x_n = b ? a   : a_n;
    x   = b ? a_n : a;
  end

  // Both inputs are dual-rail pairs.
  always_comb begin
    assert ((a_n == ~a) && (b_n == ~b))
      else $error("cpl_xor_xnor: inputs are not complementary");
  end

endmodule
