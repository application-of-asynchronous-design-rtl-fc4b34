// voltage_reference: bandgap voltage reference (behavioural model of an analog cell).
//
// When enabled and supplied, the reference needs TREADY_NS (2000 ns as
// specified) to start; then bandgap (the reference voltage, shown as a logic
// level) and ready go to 1. Disabling it, or losing its supply (below
// MIN_SUPPLY_MV, this model's choice), drops both at once. The model runs on
// its own 1 ns time step and is for simulation only.
`timescale 1ns/1ps
module voltage_reference
  import startup_pkg::*;
#(
  parameter int unsigned TREADY_NS     = 2000,
  parameter int unsigned MIN_SUPPLY_MV = 1000
) (
  input  power_t powerin,
  input  logic   enable,
  output logic   bandgap,
  output logic   ready
);
  logic        tick = 1'b0;
  logic        on;
  int unsigned on_ns = 0;

  always #0.5 tick = ~tick;

  assign on = enable && (powerin >= power_t'(MIN_SUPPLY_MV));

  always @(posedge tick) begin
    if (!on)                    on_ns <= 0;
    else if (on_ns < TREADY_NS) on_ns <= on_ns + 1;
  end

  assign ready   = on && (on_ns >= TREADY_NS);
  assign bandgap = ready;
endmodule
