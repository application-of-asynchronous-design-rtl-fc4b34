// sync_interface: turns an analog "ready" level into a 4-phase sync request.
//
// A rising edge of ready makes the pulse generator emit a short pulse into
// input A of a C-element. Input B is the inverted acknowledge, gated by the
// activate (power-on-reset, active high = running) signal. The pulse with
// B high sets req; req then stays high after the pulse ends until the
// controller raises ack (B falls, A low, req falls); when ack returns low,
// req stays low until the next rising edge of ready. One rising edge of ready
// therefore produces exactly one complete handshake. With activate low, B is
// held low and req is cleared as soon as no pulse is present.
// Structure (pulse generator, inverter, AND, C-element) follows the published
// interface; the pulse width is a parameter of this model.
//
// Latches and loops: the C-element is a latch, and req returns through the
// controller as ack into the second C-element input, which lint reports as a
// combinational loop; this is the 4-phase handshake itself.
`timescale 1ns/1ps
module sync_interface #(
  parameter int unsigned PULSE_NS = 2
) (
  input  logic activate,  // power-on reset released (porneg)
  input  logic ready,     // level from the analog cell
  output logic req,       // sync request to the controller
  input  logic ack        // sync acknowledge from the controller
);
  logic pulse, set2;

  pulse_gen #(.PULSE_NS(PULSE_NS)) u_pulse (.a(ready), .y(pulse));

  assign set2 = activate & ~ack;

  c_element u_c (.a(pulse), .b(set2), .y(req));
endmodule
