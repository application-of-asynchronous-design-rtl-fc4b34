// active_push_if: active end of the 1-bit dual-rail "vok" PUSH channel that
// tells the controller which supply is good.
//
// vok2 & ready2 and vok1 & ready1 request a mutex. The granted side produces
// a pulse (pulse generator) into a C-element whose other input is the common
// term activate & ~ack, exactly as in the sync interface: a grant for monitor 2
// raises dt (value 1), a grant for monitor 1 raises df (value 0). The rail
// falls when the controller acknowledges, and the channel then stays idle:
// a grant lasts while its request is high, so the losing side never pushes.
// With both supplies good at once, the mutex gives monitor 2 priority. The
// structure follows the published interface; the shared reset term of the
// two C-elements is as drawn.
//
// Latches and loops: the two C-elements are latches and each request
// feeds back through the acknowledge (activate & ~ack) and the mutex grants;
// lint reports these as combinational loops. They are the intended
// asynchronous feedback of the handshake, not a mistake.
`timescale 1ns/1ps
module active_push_if #(
  parameter int unsigned PULSE_NS = 2
) (
  input  logic activate,  // power-on reset released
  input  logic vok1,
  input  logic ready1,
  input  logic vok2,
  input  logic ready2,
  output logic dt,        // vok = 1: monitor 2 selected
  output logic df,        // vok = 0: monitor 1 selected
  input  logic ack
);
  logic grant2, grant1, pulse2, pulse1, set_b;

  mutex2 u_mutex (.r1(vok2 & ready2), .r2(vok1 & ready1), .g1(grant2), .g2(grant1));

  pulse_gen #(.PULSE_NS(PULSE_NS)) u_pulse2 (.a(grant2), .y(pulse2));
  pulse_gen #(.PULSE_NS(PULSE_NS)) u_pulse1 (.a(grant1), .y(pulse1));

  assign set_b = activate & ~ack;

  c_element u_c_t (.a(pulse2), .b(set_b), .y(dt));
  c_element u_c_f (.a(pulse1), .b(set_b), .y(df));
endmodule
