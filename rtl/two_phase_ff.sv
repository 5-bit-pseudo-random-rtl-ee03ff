`timescale 1ns / 1ps
// two_phase_ff: dynamic two-phase master-slave D flip-flop of the shift register.
//
// The cell is a pass transistor clocked by phi1, a 12:1 inverter, a second pass
// transistor clocked by phi2 and a second 12:1 inverter. While a pass transistor
// conducts, the gate of the following inverter follows its input; when it turns off,
// that gate capacitance holds the last value. Each pass transistor with the gate it
// drives is therefore a transparent latch, written here with always_latch:
//   master node  m follows data_in while phi1 = 1
//   slave  node  s follows NOT m   while phi2 = 1
//   data_out = NOT s, so the cell does not invert.
// With phi1 and phi2 never high together the cell is an edge-triggered flip-flop: the
// value on data_in at the fall of phi1 appears on data_out when phi2 rises.
//
// The two latches are this cell's intended storage (they are the charge on the two
// inverter gates), so the latch warnings a linter gives for m and s are expected. In a
// shift register with feedback the latches also close a loop that a linter reports as
// circular combinational logic through s; the non-overlapping phases break it, since
// the master and slave of a cell are never transparent together. The
// dynamic nodes never leak here; a real cell must be clocked fast enough to hold them.
//
// Interface: data_in, phi1, phi2 -> data_out. Both phases must not overlap.
module two_phase_ff (
  input  logic data_in,
  input  logic phi1,
  input  logic phi2,
  output logic data_out
);

  logic m;      // gate of the first inverter (charge held while phi1 = 0)
  logic m_n;    // first inverter output
  logic s;      // gate of the second inverter (charge held while phi2 = 0)

  // Pass transistor M1 on phi1.
  always_latch begin
    if (phi1) m = data_in;
  end

  ratioed_inverter #(.PD_RATIO(12)) u_inv1 (.vin(m), .vout(m_n));

  // Pass transistor M4 on phi2.
  always_latch begin
    if (phi2) s = m_n;
  end

  ratioed_inverter #(.PD_RATIO(12)) u_inv2 (.vin(s), .vout(data_out));

endmodule
