`timescale 1ns / 1ps
// prbg_ref_pkg: expected states of the generator, for the testbenches.
//
// SEQ[k] is the register state {Q4, Q3, Q2, Q1, Q0} k clock periods after reset, as
// tabulated for the chip (Q0 in bit 0, Q4 = Vout in bit 4). The table was written
// down from the state listing, not computed from the RTL; after SEQ[30] it repeats
// from SEQ[0].
package prbg_ref_pkg;

  localparam int unsigned REF_LEN = 31;

  localparam logic [4:0] SEQ [REF_LEN] = '{
    5'b00000, 5'b00001, 5'b00011, 5'b00110, 5'b01100, 5'b11001, 5'b10010, 5'b00101,
    5'b01011, 5'b10110, 5'b01101, 5'b11011, 5'b10111, 5'b01111, 5'b11110, 5'b11101,
    5'b11010, 5'b10101, 5'b01010, 5'b10100, 5'b01000, 5'b10001, 5'b00010, 5'b00100,
    5'b01001, 5'b10011, 5'b00111, 5'b01110, 5'b11100, 5'b11000, 5'b10000
  };

endpackage
