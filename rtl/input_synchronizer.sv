// input_synchronizer: chain of flip-flops per input bit that brings the
// asynchronous ready/vok levels of the analog cells into the clock domain of
// the clocked startup controller.
//
// Each bit passes through STAGES flip-flops (default 3), so a change on an
// input appears on the output STAGES clock edges later and any metastability
// of the first flop has STAGES-1 clock periods to settle. The asynchronous
// reset (active low, from the power-on reset) clears every stage.
//
// Source and choices: the stage count (three) follows the source; the
// asynchronous reset of the stages is this design's choice.
`timescale 1ns/1ps
module input_synchronizer #(
  parameter int unsigned WIDTH  = 10,
  parameter int unsigned STAGES = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [STAGES-1:0][WIDTH-1:0] stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stage <= '0;
    else        stage <= {stage[STAGES-2:0], d};
  end

  assign q = stage[STAGES-1];
endmodule
