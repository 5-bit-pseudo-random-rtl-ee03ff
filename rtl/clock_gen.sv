`timescale 1ns / 1ps
// clock_gen: behavioural model of the two-phase clock generator (not synthesizable).
//
// The generator turns the single clock input vp into two alternating phases: vp1 is
// high while vp is high and vp2 while vp is low. In silicon this is a pair of
// cross-coupled NOR gates (one fed by vp, the other by an inverted vp) followed by
// bootstrapped drivers that can swing each phase to the full supply into the load of
// five flip-flops. The drivers and bootstrap capacitors are analog, so this model keeps
// only the logic and a delay per gate:
//   vp1 = NOR(NOT vp, vp2)   vp2 = NOR(vp, vp1)   each after T_GATE_NS
// Because each phase can only rise once the other has fallen, the phases never
// overlap: after an edge of vp, the phase that was high falls T_GATE_NS later and the
// other rises 2*T_GATE_NS after the edge. That gap keeps the master and slave latches of
// a flip-flop from being open together. Taking the phases from the crossed NOR pair
// and the gate delay value are choices of this model.
//
// Interface: vp in, vp1 / vp2 out. Timing: vp must stay in each level longer than
// 2*T_GATE_NS.
module clock_gen #(
  parameter int unsigned T_GATE_NS = 5   // delay of one NOR stage, in ns
) (
  input  logic vp,
  output logic vp1,
  output logic vp2
);

  assign #(T_GATE_NS) vp1 = ~(~vp | vp2);
  assign #(T_GATE_NS) vp2 = ~(vp | vp1);

endmodule
