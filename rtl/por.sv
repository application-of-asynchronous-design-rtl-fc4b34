// por: power-on-reset generator (behavioural model of an analog cell).
//
// Watches two supplies given in mV. porneg is 0 while both are below
// THRESHOLD_MV. Once either has been at or above the threshold for TPOR_NS,
// porneg goes to 1; it returns to 0 within 1 ns of both being below again.
// Threshold (1000 mV) and Tpor (100 ns) are the specified defaults. The model
// runs on its own 1 ns time step (an internal free-running tick) and is for
// simulation only; synthesis has no use for it.
`timescale 1ns/1ps
module por
  import startup_pkg::*;
#(
  parameter int unsigned THRESHOLD_MV = POR_THRESHOLD_MV,
  parameter int unsigned TPOR_NS      = 100
) (
  input  power_t power1,
  input  power_t power2,
  output logic   porneg
);
  logic        tick = 1'b0;
  int unsigned above_ns = 0;

  always #0.5 tick = ~tick;

  always @(posedge tick) begin
    if (power1 >= power_t'(THRESHOLD_MV) || power2 >= power_t'(THRESHOLD_MV)) begin
      if (above_ns < TPOR_NS) above_ns <= above_ns + 1;
    end else begin
      above_ns <= 0;
    end
  end

  assign porneg = (above_ns >= TPOR_NS);
endmodule
