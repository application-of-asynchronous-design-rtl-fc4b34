// pulse_gen: rising-edge pulse generator (behavioural model, uses delays).
//
// The cell is an AND gate fed by a signal and by the same signal through an
// inverter; the inverter delay makes the output high for a short time after
// every rising edge of the input. Because the pulse width is set by a gate
// delay, the cell is modelled with an explicit delay (PULSE_NS) and is not
// synthesizable as written; in silicon it is two gates. The width must be long
// enough to switch the C-element that follows it.
//
// Synthesis note: the delay is a simulation delay, so synthesis sees
// a & ~a and ties the output low. A real pulse generator needs a
// delay cell of the target library.
//
// Source and choices: the AND-with-delayed-inverse structure is the one
// the source uses; the 2 ns width is this design's choice.
`timescale 1ns/1ps
module pulse_gen #(
  parameter int unsigned PULSE_NS = 2
) (
  input  logic a,
  output logic y
);
  logic a_inv_dly;

  assign #(PULSE_NS) a_inv_dly = ~a;
  assign y = a & a_inv_dly;
endmodule
