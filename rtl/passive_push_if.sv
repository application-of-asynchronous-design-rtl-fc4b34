// passive_push_if: passive end of a 4-phase dual-rail PUSH channel that keeps
// the last pushed word on a plain output for an analog cell.
//
// Each bit has an SR latch (S = dt, R = df) whose Q drives the analog input,
// and an acknowledge generator ((df & Qi) | (dt & Q)), high only when the
// bit's input code is valid and the latch already holds it. The per-bit
// acknowledges are ANDed, so ack rises when every bit is valid and stored and
// falls as soon as the word returns to the spacer (dt = df = 0). With the
// spacer on the inputs the latches keep their value, so the analog cell sees
// a steady level between pushes. 1-bit instances serve the enable inputs,
// the 3-bit instance serves selvdd.
// The reset input (active low) clears the latches; the published schematic
// has none, and is this design's addition so that every enable starts low.
// The latches are intended storage.
`timescale 1ns/1ps
module passive_push_if #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             rst_n,
  input  logic [WIDTH-1:0] dt,
  input  logic [WIDTH-1:0] df,
  output logic             ack,
  output logic [WIDTH-1:0] data
);
  logic [WIDTH-1:0] q, bit_ack;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    always_latch begin
      if (!rst_n)     q[i] <= 1'b0;
      else if (dt[i]) q[i] <= 1'b1;
      else if (df[i]) q[i] <= 1'b0;
    end
    assign bit_ack[i] = (df[i] & ~q[i]) | (dt[i] & q[i]);

    always_comb assert (!(dt[i] && df[i])) else $error("passive_push_if: dt and df both high");
  end

  assign ack  = &bit_ack;
  assign data = q;
endmodule
