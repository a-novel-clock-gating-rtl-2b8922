// xor2_cell -- two-input static CMOS XOR gate of the feedback network.
//
// The feedback network is a chain of these gates. The gate is the library's
// speed-optimised XOR: a complex NOR/AND-OR stage builds the XNOR-like internal
// node from A and B, and an output stage restores full swing. Unlike the
// pass-transistor XOR of the clock gate it always drives a full logic '1', which
// the flip-flop inputs it feeds require.
//
// Interface: a, b -> y = a xor b. Purely combinational, no state.
module xor2_cell (
  input  logic a,
  input  logic b,
  output logic y
);

  always_comb y = a ^ b;

endmodule
