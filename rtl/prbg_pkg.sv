`timescale 1ns / 1ps
// prbg_pkg: constants shared by the 5-bit pseudo-random bit generator and its testbenches.
//
// The generator is a five-stage shift register whose first stage is loaded with
// XNOR(Q1, Q4). From the all-zero state it walks through 2^5 - 1 = 31 states and
// repeats; the all-one state is the one state outside the cycle (XNOR(1,1) = 1 keeps it
// there), and only a reset leaves it. The stage count, tap positions and cycle length
// below are the chip's own; nothing here is configurable in the circuit.
package prbg_pkg;

  // Number of flip-flops in the shift register (Q0 .. Q4).
  localparam int unsigned N_STAGES = 5;

  // Feedback taps: Q0 is loaded with XNOR(Q[TAP_A], Q[TAP_B]).
  localparam int unsigned TAP_A = 1;
  localparam int unsigned TAP_B = 4;

  // Length of the output sequence before it repeats: 2^N - 1.
  localparam int unsigned SEQ_LEN = (1 << N_STAGES) - 1;

  // Number of clock periods Vrst must be held to clear every stage: the reset pull-down
  // forces 0 into the first stage and the shift register carries it to the last.
  localparam int unsigned RESET_CYCLES = N_STAGES;

  typedef logic [N_STAGES-1:0] state_t;

endpackage
