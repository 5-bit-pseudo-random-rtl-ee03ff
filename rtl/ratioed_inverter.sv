`timescale 1ns / 1ps
// ratioed_inverter: the NMOS inverter cell of the generator.
//
// The cell is a minimum-geometry load (W/L = 1) above one pull-down transistor. Two sizes
// exist: a 12:1 pull-down, used twice in every flip-flop, and a 24:1 pull-down, the base
// of the two X-Nor stages. The ratio sets the output low level and the fall time, not the
// logic, so PD_RATIO only documents which variant an instance stands for; logically the
// cell is vout = NOT vin, with no delay.
//
// Interface: vin (pull-down gate), vout (drain of the pull-down, output).
// Timing: combinational.
module ratioed_inverter #(
  parameter int unsigned PD_RATIO = 12  // pull-down W/L relative to the load: 12 or 24
) (
  input  logic vin,
  output logic vout
);

  initial begin
    assert (PD_RATIO == 12 || PD_RATIO == 24)
      else $error("ratioed_inverter: PD_RATIO must be 12 or 24, got %0d", PD_RATIO);
  end

  // Pull-down on when vin is high, load pulls the output up otherwise.
  assign vout = ~vin;

endmodule
