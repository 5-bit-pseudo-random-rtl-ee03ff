`timescale 1ns / 1ps
// prbg_top: 5-bit pseudo-random bit generator with on-chip clock generator.
//
// Five two-phase flip-flops form a shift register Q0 -> Q1 -> Q2 -> Q3 -> Q4. The first
// one is loaded with XNOR(Q1, Q4), which makes the register a maximal-length linear
// feedback shift register: from 00000 it passes through all 31 states but 11111 and
// repeats. Vout is Q4 through a non-inverting output buffer, so the pad shows a 31-bit
// pseudo-random pattern, one bit per clock period.
//
// Clocking: the single clock vp is split by the clock generator into vp1 (high with vp)
// and vp2 (high while vp is low), which never overlap. Each flip-flop samples its input
// while vp1 is high and passes it to its output when vp2 rises, so the register shifts
// once per vp period, on the falling edge of vp. Two emergency pads, e_phi1 and e_phi2,
// can supply the phases from outside instead; in silicon that is done by cutting the
// generator off, here by setting USE_EMERGENCY_CLOCKS.
//
// Reset: while vrst is high a pull-down transistor holds the first flip-flop's input at
// 0, so each clock period shifts one 0 in. After RESET_CYCLES (5) periods with vrst high
// the register is 00000, the first state of the sequence; it is also the only way out of
// 11111, which XNOR feedback would otherwise keep forever. The reset is therefore
// synchronous to the shift and takes five periods, exactly as the transistor does.
//
// The feedback taps, reset pull-down, phase polarity and buffer follow the chip's
// schematic and netlist. The gate delay of the clock generator and the buffer delays
// belong to the behavioural models.
//
// The feedback path closes a loop Q4 -> X-Nor -> Q0 through the flip-flops' latches;
// a linter sees it as a combinational loop, but the non-overlapping phases break it:
// no master and slave latch are ever transparent at the same time.
//
// Interface: vp, vrst, e_phi1, e_phi2 in; vout out. With the emergency pads in use,
// e_phi1 and e_phi2 must not be high together.
module prbg_top
  import prbg_pkg::*;
#(
  parameter bit USE_EMERGENCY_CLOCKS = 1'b0  // 1: phases come from e_phi1/e_phi2
) (
  input  logic vp,       // clock input
  input  logic vrst,     // reset, active high, held for RESET_CYCLES clock periods
  input  logic e_phi1,   // emergency phase 1 pad (used when USE_EMERGENCY_CLOCKS = 1)
  input  logic e_phi2,   // emergency phase 2 pad (used when USE_EMERGENCY_CLOCKS = 1)
  output logic vout      // buffered Q4
);

  logic   gen_phi1, gen_phi2;   // phases from the clock generator
  logic   phi1, phi2;           // phases distributed to the flip-flops
  logic   fb;                   // X-Nor output
  logic   d0;                   // first flip-flop input, after the reset pull-down
  state_t q;                    // q[i] is Qi
  state_t din;                  // din[i] is the input of flip-flop i

  clock_gen u_clock_gen (
    .vp  (vp),
    .vp1 (gen_phi1),
    .vp2 (gen_phi2)
  );

  assign phi1 = USE_EMERGENCY_CLOCKS ? e_phi1 : gen_phi1;
  assign phi2 = USE_EMERGENCY_CLOCKS ? e_phi2 : gen_phi2;

  xnor_gate u_xnor (
    .a (q[TAP_A]),
    .b (q[TAP_B]),
    .y (fb)
  );

  // Reset transistor: pulls the X-Nor output node to ground while vrst is high.
  assign d0 = vrst ? 1'b0 : fb;

  // Each flip-flop feeds the next one.
  assign din = {q[N_STAGES-2:0], d0};

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    two_phase_ff u_ff (
      .data_in  (din[i]),
      .phi1     (phi1),
      .phi2     (phi2),
      .data_out (q[i])
    );
  end

  output_buffer u_out_buf (
    .vin  (q[N_STAGES-1]),
    .vout (vout)
  );

endmodule
