`timescale 1ns / 1ps
// xnor_gate: the feedback X-Nor of the generator, built as two NMOS compound gates.
//
// Stage 1 is a 24:1 inverter whose pull-down has a second transistor in series, gated by
// b: it pulls low only when a and b are both high, so n1 = NAND(a, b).
// Stage 2 is a 24:1 inverter on n1 whose pull-down is in series with two parallel
// transistors gated by a and b: it pulls low when n1 = 1 and (a or b) = 1, so
//   y = NOT(NAND(a, b) AND (a OR b)) = NOT(a XOR b).
// The transistor sizes (all pull-downs W/L = 24) only shape the edges.
//
// Interface: a, b -> y = XNOR(a, b). Timing: combinational.
module xnor_gate (
  input  logic a,
  input  logic b,
  output logic y
);

  logic n1;   // output of the first compound stage

  always_comb begin
    n1 = ~(a & b);
    y  = ~(n1 & (a | b));
  end

endmodule
