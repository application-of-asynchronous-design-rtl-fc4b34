// passive_pull_if: passive end of a 4-phase dual-rail PULL channel that hands
// an analog level (vok) to the controller on request.
//
// While req is high the interface shows the level as a dual-rail code
// (dt = 1 for a high level, df = 1 for a low one); while req is low both
// rails are low (spacer). With LATCHED = 1 (the modified interface, the
// default) a gated SR latch, transparent only while req is low, freezes the
// level for the whole time req is high, so the code cannot change in the
// middle of a handshake. LATCHED = 0 gives the simple interface of two AND
// gates and an inverter, which passes changes straight through.
// Both variants follow the published schematics; the latch is intended.
//
// Source and choices: both variants and their gates follow the source
// (simple and modified PULL interface); the parameter selecting them is this
// design's.
`timescale 1ns/1ps
module passive_pull_if #(
  parameter bit LATCHED = 1'b1
) (
  input  logic data,  // level from the analog cell
  input  logic req,   // pull request from the controller
  output logic dt,
  output logic df
);
  logic q;

  if (LATCHED) begin : g_latched
    always_latch begin
      if (!req) q <= data;
    end
  end else begin : g_simple
    assign q = data;
  end

  assign dt = req & q;
  assign df = req & ~q;
endmodule
