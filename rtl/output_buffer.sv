`timescale 1ns / 1ps
// output_buffer: behavioural model of the two-stage bootstrapped output driver
// (not synthesizable).
//
// The last flip-flop drives the Vout pad through two inverting stages, so the pad shows
// the flip-flop's value unchanged. Stage 1 is an inverter with a minimum load and a
// 12:1 pull-down. Stage 2 is a large 36:1 pull-down with a bootstrapped 9:1 pull-up so
// that the output reaches the full supply into a 10 pF load. The transistor sizing makes
// the rising edge slower than the falling one; this model reproduces that as a delay
// per edge, with defaults equal to the 10-90 % rise (30 ns) and fall (20 ns) times of
// the extracted circuit at 10 pF. The delay is inertial: a level on vin that lasts
// shorter than the delay of its edge never reaches vout.
//
// Interface: vin (last flip-flop output) -> vout (pad). Timing: vout follows vin after
// T_RISE_NS for a rising edge and T_FALL_NS for a falling edge.
module output_buffer #(
  parameter int unsigned T_RISE_NS = 30,  // delay of a rising edge on vout, in ns
  parameter int unsigned T_FALL_NS = 20   // delay of a falling edge on vout, in ns
) (
  input  logic vin,
  output logic vout
);

  logic stage1;   // first stage output, inverted vin
  logic target;   // value the second stage is driving towards
  logic late_r;   // target seen through the rising-edge delay
  logic late_f;   // target seen through the falling-edge delay

  assign stage1 = ~vin;
  assign target = ~stage1;

  // Two delayed copies of the target. When the rising delay is the longer one, vout
  // rises only once both copies are high (after T_RISE_NS) and falls as soon as one is
  // low (after T_FALL_NS); otherwise the other way round. A pulse shorter than the
  // delays does not reach either copy, since a delayed assignment drops it.
  assign #(T_RISE_NS) late_r = target;
  assign #(T_FALL_NS) late_f = target;

  if (T_RISE_NS >= T_FALL_NS) begin : g_slow_rise
    assign vout = late_r & late_f;
  end else begin : g_slow_fall
    assign vout = late_r | late_f;
  end

endmodule
