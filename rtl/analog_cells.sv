// analog_cells: the set of analog cells around the startup controller
// (behavioural models, simulation only).
//
// POR on both supplies; voltage monitor 1 on VDDIO1 (1600 mV), monitor 2 on
// VDDIO2 (3300 mV), monitor 3 on VDDCORE (1600 mV); reference and regulator 1
// supplied from VDDIO1, reference and regulator 2 from VDDIO2; each regulator
// takes the bandgap of its own reference; both regulators get the same selvdd
// and drive VDDCORE (the switched-off one drives 0 mV, and the model takes
// the higher of the two). Enables come in and ready/vok levels go out as
// arrays indexed by cell_e. Connections follow the startup system drawing and
// the startup specification; combining the regulator outputs by maximum is
// this model's choice.
`timescale 1ns/1ps
module analog_cells
  import startup_pkg::*;
(
  input  power_t               vddio1,
  input  power_t               vddio2,
  output power_t               vddcore,
  output logic                 porneg,
  input  logic [NUM_CELLS-1:0] enable,
  input  selvdd_t              selvdd,
  output logic [NUM_CELLS-1:0] ready,
  output logic                 mon1_vok,
  output logic                 mon2_vok,
  output logic                 mon3_vok
);
  logic   bandgap1, bandgap2;
  power_t vreg1_out, vreg2_out;

  por u_por (.power1(vddio1), .power2(vddio2), .porneg(porneg));

  voltage_monitor #(.VTHRESHOLD_MV(VDDIO1_GOOD_MV)) u_mon1 (
    .power(vddio1), .enable(enable[CELL_MON1]), .ready(ready[CELL_MON1]), .vok(mon1_vok));
  voltage_monitor #(.VTHRESHOLD_MV(VDDIO2_GOOD_MV)) u_mon2 (
    .power(vddio2), .enable(enable[CELL_MON2]), .ready(ready[CELL_MON2]), .vok(mon2_vok));
  voltage_monitor #(.VTHRESHOLD_MV(VDDCORE_OK_MV)) u_mon3 (
    .power(vddcore), .enable(enable[CELL_MON3]), .ready(ready[CELL_MON3]), .vok(mon3_vok));

  voltage_reference u_ref1 (
    .powerin(vddio1), .enable(enable[CELL_REF1]), .bandgap(bandgap1), .ready(ready[CELL_REF1]));
  voltage_reference u_ref2 (
    .powerin(vddio2), .enable(enable[CELL_REF2]), .bandgap(bandgap2), .ready(ready[CELL_REF2]));

  voltage_regulator u_vreg1 (
    .powerin(vddio1), .powerout(vreg1_out), .enable(enable[CELL_VREG1]), .bandgap(bandgap1),
    .selvdd(selvdd), .ready(ready[CELL_VREG1]));
  voltage_regulator u_vreg2 (
    .powerin(vddio2), .powerout(vreg2_out), .enable(enable[CELL_VREG2]), .bandgap(bandgap2),
    .selvdd(selvdd), .ready(ready[CELL_VREG2]));

  assign vddcore = (vreg1_out > vreg2_out) ? vreg1_out : vreg2_out;
endmodule
