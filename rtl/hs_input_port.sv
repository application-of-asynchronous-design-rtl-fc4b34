// hs_input_port: passive end of a 1-bit 4-phase dual-rail PUSH channel, used
// inside the clockless controller to receive the "vok" selection.
//
// While go is high, a valid code (dt or df high) is stored in value
// (dt -> 1, df -> 0) and acknowledged; when the sender returns to the spacer,
// ack falls and done rises. value keeps the received bit until reset, so the
// controller can use it after the handshake (it is a Balsa-style variable).
// Latches are intended.
//
// Circuit notes: got and value are latches, and got feeds back into the
// acknowledge that ends the data phase, which lint reports as a loop; this
// is the intended handshake order.
//
// Source and choices: the source compiles its controller from a handshake
// language; this port, and the rule that the data latch captures before the
// acknowledge, are this design's own.
`timescale 1ns/1ps
module hs_input_port (
  input  logic rst_n,
  input  logic go,
  output logic done,
  output logic value,
  input  logic dt,
  input  logic df,
  output logic ack
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
    if (!rst_n)                  value <= 1'b0;
    else if (go && !got && valid) value <= dt;
  end

  assign ack  = got & valid;
  assign done = got & ~valid;
endmodule
