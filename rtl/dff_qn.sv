// dff_qn -- positive-edge D flip-flop with true and complementary outputs.
//
// Register cell of every LFSR stage. The cell is a master-slave flip-flop: the
// master latch is transparent while the clock is low and the slave copies it
// while the clock is high, so the output takes D at the rising edge and holds it
// for the rest of the cycle. Its complementary output QN is used as the second
// rail of the dual-rail clock-gate inputs, so no extra inverter is needed there.
//
// Interface: clk (rising edge active), d, q, qn = ~q.
// Timing: q changes only after a rising edge of clk; there is no reset, the
// register is initialised by loading a seed through D.
// The edge-triggered master-slave cell with a QN output follows the reference
// cell; modelling it as a single edge-triggered register is this design's choice.
module dff_qn (
  input  logic clk,
  input  logic d,
  output logic q,
  output logic qn
);

  always_ff @(posedge clk) q <= d;

  assign qn = ~q;

endmodule
