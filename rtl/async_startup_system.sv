// async_startup_system: the microcontroller startup system with the clockless
// 4-phase dual-rail controller and its analog-cell interfaces.
//
// The same analog cells as the clocked system, each joined to the controller
// through the interface that suits its signal:
//   enable inputs  <- passive PUSH interface, 1 bit (7 of them)
//   selvdd         <- passive PUSH interface, 3 bits (shared by both regulators)
//   ready outputs  -> sync interface (7 of them)
//   vok1/vok2      -> active PUSH interface with mutex (one 1-bit channel)
//   vok3           -> modified passive PULL interface
// The controller's activation request and every interface reset come from
// porneg, so the whole system restarts when the POR cell asserts reset.
// done (the controller's activation acknowledge) rises when VDDCORE is ok.
// There is no clock anywhere in this system.
//
// Latches and loops: this level only wires the interfaces to the
// controller, but every handshake channel closes a loop through it
// (request -> interface -> acknowledge -> controller -> request), so lint
// reports combinational loops and synthesis finds the latches of the
// interfaces and of the controller. These are the intended asynchronous
// circuit; no clock is involved.
//
// Source and choices: which interface serves which channel (push for enables
// and selvdd, sync for ready, active push for the supply choice, latched pull
// for vok3) follows the source description; using porneg as the activation
// request and as the reset of the interface latches is this design's choice.
`timescale 1ns/1ps
module async_startup_system
  import startup_pkg::*;
(
  input  power_t       vddio1,
  input  power_t       vddio2,
  output power_t       vddcore,
  output logic         porneg,
  output logic         done,
  output analog_ctrl_t ctrl,
  output async_step_e  step
);
  logic [NUM_CELLS-1:0] enable, ready, en_dt, en_df, en_ack, rdy_req, rdy_ack;
  logic                 mon1_vok, mon2_vok, mon3_vok;
  selvdd_t              selvdd, selvdd_dt, selvdd_df;
  logic                 selvdd_ack, vok_dt, vok_df, vok_ack, vok3_req, vok3_dt, vok3_df;

  analog_cells u_cells (
    .vddio1(vddio1), .vddio2(vddio2), .vddcore(vddcore), .porneg(porneg),
    .enable(enable), .selvdd(selvdd), .ready(ready),
    .mon1_vok(mon1_vok), .mon2_vok(mon2_vok), .mon3_vok(mon3_vok));

  for (genvar i = 0; i < NUM_CELLS; i++) begin : g_cell
    passive_push_if #(.WIDTH(1)) u_en_if (
      .rst_n(porneg), .dt(en_dt[i]), .df(en_df[i]), .ack(en_ack[i]), .data(enable[i]));
    sync_interface u_rdy_if (
      .activate(porneg), .ready(ready[i]), .req(rdy_req[i]), .ack(rdy_ack[i]));
  end

  passive_push_if #(.WIDTH(SELVDD_BITS)) u_selvdd_if (
    .rst_n(porneg), .dt(selvdd_dt), .df(selvdd_df), .ack(selvdd_ack), .data(selvdd));

  active_push_if u_vok_if (
    .activate(porneg), .vok1(mon1_vok), .ready1(ready[CELL_MON1]),
    .vok2(mon2_vok), .ready2(ready[CELL_MON2]), .dt(vok_dt), .df(vok_df), .ack(vok_ack));

  passive_pull_if #(.LATCHED(1'b1)) u_vok3_if (
    .data(mon3_vok), .req(vok3_req), .dt(vok3_dt), .df(vok3_df));

  startup_logic_async u_ctrl (
    .activate_r(porneg), .activate_a(done),
    .en_dt(en_dt), .en_df(en_df), .en_ack(en_ack),
    .rdy_req(rdy_req), .rdy_ack(rdy_ack),
    .selvdd_dt(selvdd_dt), .selvdd_df(selvdd_df), .selvdd_ack(selvdd_ack),
    .vok_dt(vok_dt), .vok_df(vok_df), .vok_ack(vok_ack),
    .vok3_req(vok3_req), .vok3_dt(vok3_dt), .vok3_df(vok3_df),
    .step(step));

  assign ctrl.mon1_enable  = enable[CELL_MON1];
  assign ctrl.mon2_enable  = enable[CELL_MON2];
  assign ctrl.mon3_enable  = enable[CELL_MON3];
  assign ctrl.ref1_enable  = enable[CELL_REF1];
  assign ctrl.ref2_enable  = enable[CELL_REF2];
  assign ctrl.vreg1_enable = enable[CELL_VREG1];
  assign ctrl.vreg2_enable = enable[CELL_VREG2];
  assign ctrl.selvdd       = selvdd;
endmodule
