// startup_top: the two startup systems side by side.
//
// The clocked reference system and the clockless 4-phase dual-rail system
// each get their own pair of supplies and drive their own VDDCORE, so both
// can be powered up with the same or different supply ramps and compared.
// Only the clocked system uses clk. Status outputs show each system's
// enables, selvdd, reset and progress.
//
// Latches and loops: the asynchronous system contains level-sensitive latches
// and handshake loops by design (see async_startup_system); lint and
// synthesis report them here because they are inside this top.
//
// Source and choices: the source builds the two controllers as alternatives
// for the same analog system; showing them side by side in one top, each
// with its own copy of the analog models, is this design's choice.
`timescale 1ns/1ps
module startup_top
  import startup_pkg::*;
(
  input  logic         clk,
  input  power_t       sync_vddio1,
  input  power_t       sync_vddio2,
  output power_t       sync_vddcore,
  output logic         sync_porneg,
  output analog_ctrl_t sync_ctrl,
  output sync_state_e  sync_state,
  input  power_t       async_vddio1,
  input  power_t       async_vddio2,
  output power_t       async_vddcore,
  output logic         async_porneg,
  output logic         async_done,
  output analog_ctrl_t async_ctrl,
  output async_step_e  async_step
);
  sync_startup_system u_sync (
    .clk(clk), .vddio1(sync_vddio1), .vddio2(sync_vddio2), .vddcore(sync_vddcore),
    .porneg(sync_porneg), .ctrl(sync_ctrl), .state(sync_state));

  async_startup_system u_async (
    .vddio1(async_vddio1), .vddio2(async_vddio2), .vddcore(async_vddcore),
    .porneg(async_porneg), .done(async_done), .ctrl(async_ctrl), .step(async_step));
endmodule
