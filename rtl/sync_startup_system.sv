// sync_startup_system: the microcontroller startup system with the clocked
// controller.
//
// The analog cells (POR, three voltage monitors, two references, two
// regulators) are wired to startup_logic_sync. The controller is held in its
// RESET state by porneg and, clocked by clk (20 MHz in the specification),
// brings VDDCORE up: it picks the good supply (VDDIO2 preferred), starts its
// reference and regulator at 600 mV and raises selvdd one step per regulator
// ready until monitor 3 sees VDDCORE >= 1600 mV. Status outputs expose the
// enables, selvdd and the controller state.
`timescale 1ns/1ps
module sync_startup_system
  import startup_pkg::*;
(
  input  logic         clk,
  input  power_t       vddio1,
  input  power_t       vddio2,
  output power_t       vddcore,
  output logic         porneg,
  output analog_ctrl_t ctrl,
  output sync_state_e  state
);
  logic [NUM_CELLS-1:0] enable, ready;
  logic                 mon1_vok, mon2_vok, mon3_vok;

  assign enable[CELL_MON1]  = ctrl.mon1_enable;
  assign enable[CELL_MON2]  = ctrl.mon2_enable;
  assign enable[CELL_MON3]  = ctrl.mon3_enable;
  assign enable[CELL_REF1]  = ctrl.ref1_enable;
  assign enable[CELL_REF2]  = ctrl.ref2_enable;
  assign enable[CELL_VREG1] = ctrl.vreg1_enable;
  assign enable[CELL_VREG2] = ctrl.vreg2_enable;

  analog_cells u_cells (
    .vddio1(vddio1), .vddio2(vddio2), .vddcore(vddcore), .porneg(porneg),
    .enable(enable), .selvdd(ctrl.selvdd), .ready(ready),
    .mon1_vok(mon1_vok), .mon2_vok(mon2_vok), .mon3_vok(mon3_vok));

  startup_logic_sync u_ctrl (
    .clk(clk), .porneg(porneg),
    .mon1_vok(mon1_vok), .mon1_ready(ready[CELL_MON1]),
    .mon2_vok(mon2_vok), .mon2_ready(ready[CELL_MON2]),
    .mon3_vok(mon3_vok), .mon3_ready(ready[CELL_MON3]),
    .ref1_ready(ready[CELL_REF1]), .ref2_ready(ready[CELL_REF2]),
    .vreg1_ready(ready[CELL_VREG1]), .vreg2_ready(ready[CELL_VREG2]),
    .ctrl(ctrl), .state(state));
endmodule
