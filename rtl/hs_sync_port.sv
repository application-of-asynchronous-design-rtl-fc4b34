// hs_sync_port: passive end of a 4-phase sync (dataless) channel, used inside
// the clockless controller to wait for a ready event of an analog cell.
//
// While go is high the port answers a request: req high -> ack high,
// req low -> ack low, and done rises when the handshake is complete. A request
// that arrived before go stays pending (the requester holds req) and is
// answered as soon as go rises. The "got" latch (intended) is cleared by go
// low or rst_n.
//
// Circuit notes: got is a latch set by the request; ack depends on got,
// and the request falls in answer to ack, closing the handshake loop.
//
// Source and choices: the sync (dataless) channel is the source's; the
// circuit of this port is this design's own.
`timescale 1ns/1ps
module hs_sync_port (
  input  logic rst_n,
  input  logic go,
  output logic done,
  input  logic req,
  output logic ack
);
  logic got;

  always_latch begin
    if (!rst_n || !go) got <= 1'b0;
    else if (req)      got <= 1'b1;
  end

  assign ack  = got & req;
  assign done = got & ~req;
endmodule
