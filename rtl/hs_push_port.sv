// hs_push_port: active end of a 4-phase dual-rail PUSH channel, used inside
// the clockless controller (one per output channel).
//
// The controller's step logic raises go and holds value steady. The port
// drives the dual-rail code of value (dt = value, df = ~value), waits for
// ack, returns the rails to the spacer (all low), waits for ack to fall and
// then raises done. When go falls the port clears and done falls; the
// channel is then idle again. The "sent" latch is the port's only state
// (intended), cleared by rst_n or by go low.
//
// Circuit notes: sent is a latch set by the acknowledge, which itself
// depends on the rails this port drives; lint reports the loop, which is the
// 4-phase handshake.
//
// Source and choices: the 4-phase dual-rail push protocol is the source's;
// the circuit of this port is this design's own.
`timescale 1ns/1ps
module hs_push_port #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             rst_n,
  input  logic             go,
  input  logic [WIDTH-1:0] value,
  output logic             done,
  output logic [WIDTH-1:0] dt,
  output logic [WIDTH-1:0] df,
  input  logic             ack
);
  logic sent;

  always_latch begin
    if (!rst_n || !go) sent <= 1'b0;
    else if (ack)      sent <= 1'b1;
  end

  assign dt   = (go && !sent) ? value  : '0;
  assign df   = (go && !sent) ? ~value : '0;
  assign done = sent & ~ack;
endmodule
