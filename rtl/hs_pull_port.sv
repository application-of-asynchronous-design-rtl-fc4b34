// hs_pull_port: active end of a 1-bit 4-phase dual-rail PULL channel, used
// inside the clockless controller to read monitor 3's vok.
//
// go raises req; the first valid code returned (dt -> 1, df -> 0) is stored
// in value and req is lowered; when the sender returns to the spacer done
// rises. go low clears the port. value keeps the bit until the next pull or
// reset. Latches are intended.
//
// Circuit notes: got and value are latches, and req depends on got, which
// the reply sets; lint reports this handshake loop as combinational.
//
// Source and choices: the pull protocol (request, dual-rail reply, return to
// zero) is the source's; the circuit of this port is this design's own.
`timescale 1ns/1ps
module hs_pull_port (
  input  logic rst_n,
  input  logic go,
  output logic done,
  output logic value,
  output logic req,
  input  logic dt,
  input  logic df
);
  logic got, valid;

  assign valid = dt | df;

  // got is set only once value already holds the incoming bit, so the
  // acknowledge cannot overtake the capture.
  always_latch begin
    if (!rst_n || !go)                 got <= 1'b0;
    else if (valid && (value == dt))   got <= 1'b1;
  end

  always_latch begin
    if (!rst_n)                   value <= 1'b0;
    else if (go && !got && valid) value <= dt;
  end

  assign req  = go & ~got;
  assign done = got & ~valid;
endmodule
