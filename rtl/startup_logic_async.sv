// startup_logic_async: clockless startup controller speaking 4-phase
// dual-rail on every channel.
//
// It runs the "optimized implementation 3" startup program, one handshake
// step after another, with no clock:
//   1. push enable=1 to monitors 1 and 2 and wait for both ready events
//      (four handshakes in parallel);
//   2. receive the 1-bit "vok" word from the active PUSH interface
//      (1: supply 2 good, 0: supply 1 good);
//   3. push enable=1 to the chosen reference and wait for its ready;
//   4. push enable=1 to the chosen regulator;
//   5. push enable=0 to monitors 1 and 2;
//   6. push enable=1 to monitor 3 and wait for its ready;
//   7. while the last vok3 read is 0: count := count+1 (saturating at 7),
//      push count on selvdd, wait for the chosen regulator's ready event,
//      pull vok3 from monitor 3;
//   8. raise activate_a and stay until activate_r falls.
// activate_r is the Balsa-style activation request (wired to porneg); while
// it is low every step, port and variable is cleared, the same as a reset.
//
// Structure: each channel has a small port (hs_push_port, hs_sync_port,
// hs_input_port, hs_pull_port) that performs one full 4-phase handshake
// while its go input is high and then reports done. The step sequencer is an
// asynchronous (Huffman-style) state machine: the step is held in a latch
// that follows the next-step function, which only moves on when every port
// of the current step has reported done, and then through a return-to-zero
// step in which all go inputs are low and every port has cleared. The count
// variable uses two latches: the incremented value is captured while it is
// pushed and copied into count while the controller waits for the
// regulator, so count never feeds back through the adder.
// The program and the channel protocol follow the published design; this
// sequencer and port structure is this design's own realization of it (the
// published circuit was compiled to handshake components by Balsa). The
// latches and the step feedback loop are intended: they are the memory of
// a clockless circuit. As RTL it assumes that each step's input changes have
// settled before the next (fundamental mode), which the handshake order
// guarantees at the channel level.
//
// Circuit notes: step, count, count_nxt and the port flags are latches,
// and the step latch feeds its own next-step function; lint reports these as
// combinational loops. This is a clockless (Huffman-style) state machine: a
// step changes only when the handshakes of the current step have completed,
// and every step is followed by a return step, so no race between two
// latches decides the outcome.
`timescale 1ns/1ps
module startup_logic_async
  import startup_pkg::*;
(
  input  logic                   activate_r,   // start / keep running (porneg)
  output logic                   activate_a,   // startup finished
  // enable channels, one per analog cell (index: cell_e), active PUSH
  output logic [NUM_CELLS-1:0]   en_dt,
  output logic [NUM_CELLS-1:0]   en_df,
  input  logic [NUM_CELLS-1:0]   en_ack,
  // ready channels, one per analog cell, passive sync
  input  logic [NUM_CELLS-1:0]   rdy_req,
  output logic [NUM_CELLS-1:0]   rdy_ack,
  // selvdd channel, 3-bit active PUSH
  output selvdd_t                selvdd_dt,
  output selvdd_t                selvdd_df,
  input  logic                   selvdd_ack,
  // vok selection channel, 1-bit passive PUSH (input)
  input  logic                   vok_dt,
  input  logic                   vok_df,
  output logic                   vok_ack,
  // vok3 channel, 1-bit active PULL
  output logic                   vok3_req,
  input  logic                   vok3_dt,
  input  logic                   vok3_df,
  output async_step_e            step          // current step, for observation
);
  logic [NUM_CELLS-1:0] en_go, en_val, en_done, rdy_go, rdy_done;
  logic                 sel_go, sel_done, vok_go, vok_done, vok3_go, vok3_done;
  logic                 vsel, vok3_t;
  selvdd_t              count, count_nxt;
  async_step_e          step_nxt;
  cell_e                ref_x, vreg_x;

  // ---- channel ports ---------------------------------------------------
  for (genvar i = 0; i < NUM_CELLS; i++) begin : g_cell
    hs_push_port #(.WIDTH(1)) u_en (
      .rst_n(activate_r), .go(en_go[i]), .value(en_val[i]), .done(en_done[i]),
      .dt(en_dt[i]), .df(en_df[i]), .ack(en_ack[i]));
    hs_sync_port u_rdy (
      .rst_n(activate_r), .go(rdy_go[i]), .done(rdy_done[i]),
      .req(rdy_req[i]), .ack(rdy_ack[i]));
  end

  hs_push_port #(.WIDTH(SELVDD_BITS)) u_sel (
    .rst_n(activate_r), .go(sel_go), .value(count_nxt), .done(sel_done),
    .dt(selvdd_dt), .df(selvdd_df), .ack(selvdd_ack));

  hs_input_port u_vok (
    .rst_n(activate_r), .go(vok_go), .done(vok_done), .value(vsel),
    .dt(vok_dt), .df(vok_df), .ack(vok_ack));

  hs_pull_port u_vok3 (
    .rst_n(activate_r), .go(vok3_go), .done(vok3_done), .value(vok3_t),
    .req(vok3_req), .dt(vok3_dt), .df(vok3_df));

  // supply 2 chosen (vok = 1) -> reference 2 / regulator 2
  assign ref_x  = vsel ? CELL_REF2  : CELL_REF1;
  assign vreg_x = vsel ? CELL_VREG2 : CELL_VREG1;

  // ---- count variable: saturating increment through two latches ---------
  always_latch begin
    if (!activate_r)                count_nxt <= '0;
    else if (step == AS_SEL_PUSH)   count_nxt <= (count == VDD_2000) ? count : count + 1'b1;
  end

  always_latch begin
    if (!activate_r)                count <= '0;
    else if (step == AS_VREG_WAIT)  count <= count_nxt;
  end

  // ---- step sequencer ----------------------------------------------------
  always_comb begin
    en_go    = '0;
    en_val   = '0;
    rdy_go   = '0;
    sel_go   = 1'b0;
    vok_go   = 1'b0;
    vok3_go  = 1'b0;
    step_nxt = step;
    unique case (step)
      AS_IDLE: step_nxt = AS_MON_ON;

      AS_MON_ON: begin
        en_go[CELL_MON1]  = 1'b1; en_val[CELL_MON1] = 1'b1;
        en_go[CELL_MON2]  = 1'b1; en_val[CELL_MON2] = 1'b1;
        rdy_go[CELL_MON1] = 1'b1;
        rdy_go[CELL_MON2] = 1'b1;
        if (en_done[CELL_MON1] && en_done[CELL_MON2] && rdy_done[CELL_MON1] && rdy_done[CELL_MON2])
          step_nxt = AS_MON_ON_R;
      end
      AS_MON_ON_R: if (!(|en_done) && !(|rdy_done)) step_nxt = AS_SELECT;

      AS_SELECT: begin
        vok_go = 1'b1;
        if (vok_done) step_nxt = AS_SELECT_R;
      end
      AS_SELECT_R: if (!vok_done) step_nxt = AS_REF_ON;

      AS_REF_ON: begin
        en_go[ref_x]  = 1'b1; en_val[ref_x] = 1'b1;
        rdy_go[ref_x] = 1'b1;
        if (en_done[ref_x] && rdy_done[ref_x]) step_nxt = AS_REF_ON_R;
      end
      AS_REF_ON_R: if (!(|en_done) && !(|rdy_done)) step_nxt = AS_VREG_ON;

      AS_VREG_ON: begin
        en_go[vreg_x] = 1'b1; en_val[vreg_x] = 1'b1;
        if (en_done[vreg_x]) step_nxt = AS_VREG_ON_R;
      end
      AS_VREG_ON_R: if (!(|en_done)) step_nxt = AS_MON_OFF;

      AS_MON_OFF: begin
        en_go[CELL_MON1] = 1'b1;
        en_go[CELL_MON2] = 1'b1;
        if (en_done[CELL_MON1] && en_done[CELL_MON2]) step_nxt = AS_MON_OFF_R;
      end
      AS_MON_OFF_R: if (!(|en_done)) step_nxt = AS_MON3_ON;

      AS_MON3_ON: begin
        en_go[CELL_MON3]  = 1'b1; en_val[CELL_MON3] = 1'b1;
        rdy_go[CELL_MON3] = 1'b1;
        if (en_done[CELL_MON3] && rdy_done[CELL_MON3]) step_nxt = AS_MON3_ON_R;
      end
      AS_MON3_ON_R: if (!(|en_done) && !(|rdy_done)) step_nxt = AS_TEST;

      AS_TEST: step_nxt = vok3_t ? AS_DONE : AS_SEL_PUSH;

      AS_SEL_PUSH: begin
        sel_go = 1'b1;
        if (sel_done) step_nxt = AS_SEL_PUSH_R;
      end
      AS_SEL_PUSH_R: if (!sel_done) step_nxt = AS_VREG_WAIT;

      AS_VREG_WAIT: begin
        rdy_go[vreg_x] = 1'b1;
        if (rdy_done[vreg_x]) step_nxt = AS_VREG_WAIT_R;
      end
      AS_VREG_WAIT_R: if (!(|rdy_done)) step_nxt = AS_VOK3;

      AS_VOK3: begin
        vok3_go = 1'b1;
        if (vok3_done) step_nxt = AS_VOK3_R;
      end
      AS_VOK3_R: if (!vok3_done) step_nxt = AS_TEST;

      AS_DONE: ;

      default: step_nxt = AS_IDLE;
    endcase
  end

  always_latch begin
    if (!activate_r)             step <= AS_IDLE;
    else if (step_nxt != step)   step <= step_nxt;
  end

  assign activate_a = (step == AS_DONE);
endmodule
