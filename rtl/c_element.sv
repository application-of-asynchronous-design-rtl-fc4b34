// c_element: Muller C-element.
//
// The output copies the inputs when both agree and keeps its value when they
// differ (0/0 -> 0, 1/1 -> 1, otherwise hold), which is the truth table the
// asynchronous interfaces rely on. It is written as a level-sensitive latch
// whose enable is "inputs equal"; a standard-cell flow would map it to a
// C-element cell or to the majority gate with feedback. The state before the
// inputs first agree is not defined; the interfaces using it force both
// inputs low under reset. The latch is intended (it is the cell's memory).
//
// Source and choices: the truth table is the standard Muller C-element of the
// source; writing it as a latch rather than AND/OR gates is this design's
// choice and behaves the same.
`timescale 1ns/1ps
module c_element (
  input  logic a,
  input  logic b,
  output logic y
);
  always_latch begin
    if (a == b) y <= a;
  end
endmodule
