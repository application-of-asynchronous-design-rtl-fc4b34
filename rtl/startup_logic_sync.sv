// startup_logic_sync: clocked startup controller (the synchronous reference).
//
// A Mealy state machine clocked by the on-chip oscillator (20 MHz) steps the
// analog cells through the power-up sequence:
//   RESET       nothing enabled; held here while porneg is low (async reset)
//   MON_ON      monitors 1 and 2 on, wait until both report ready
//   MON_SELECT  VDDIO2 good -> REF2_ON, else VDDIO1 good -> REF1_ON, else wait
//   REFx_ON     reference x on, wait for its ready
//   VREGx_ON    reference x, regulator x and monitor 3 on, selvdd = 000
//               (600 mV); wait for monitor 3 ready
//   INC         when the regulator is ready, VDDCORE is not yet ok and selvdd
//               is below 111, raise selvdd by one and go to INC2
//   INC2        wait state that gives regulator and monitor 3 time to react
// Every ready/vok input is first passed through a 3-flip-flop synchronizer,
// and every output comes straight from a flip-flop so that the analog cells
// never see glitches. An input change thus takes 3 cycles to be seen and
// one more to act on.
// Departures from the published machine, both this design's choices:
// selvdd stops at 111 (as the text says; the published listing stops one code
// lower), and INC2 returns to INC only after the synchronized ready of the
// active regulator has dropped, i.e. after the regulator has taken the new
// selvdd. With a multi-stage synchronizer an unconditional INC2 -> INC would
// see the old ready still high and step selvdd twice.
`timescale 1ns/1ps
module startup_logic_sync
  import startup_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 3
) (
  input  logic         clk,
  input  logic         porneg,       // power-on reset, 0 = reset
  input  logic         mon1_vok,
  input  logic         mon1_ready,
  input  logic         mon2_vok,
  input  logic         mon2_ready,
  input  logic         mon3_vok,
  input  logic         mon3_ready,
  input  logic         ref1_ready,
  input  logic         ref2_ready,
  input  logic         vreg1_ready,
  input  logic         vreg2_ready,
  output analog_ctrl_t ctrl,         // registered enables and selvdd
  output sync_state_e  state         // current state, for observation
);
  typedef struct packed {
    logic mon1_vok, mon1_ready, mon2_vok, mon2_ready, mon3_vok, mon3_ready;
    logic ref1_ready, ref2_ready, vreg1_ready, vreg2_ready;
  } inputs_t;

  inputs_t      in_async, s;
  sync_state_e  state_nxt;
  analog_ctrl_t ctrl_nxt;
  logic         vddio1_good, vddio2_good, vreg_ready;

  assign in_async = '{mon1_vok, mon1_ready, mon2_vok, mon2_ready, mon3_vok, mon3_ready,
                      ref1_ready, ref2_ready, vreg1_ready, vreg2_ready};

  input_synchronizer #(.WIDTH($bits(inputs_t)), .STAGES(SYNC_STAGES)) u_sync (
    .clk(clk), .rst_n(porneg), .d(in_async), .q(s));

  assign vddio1_good = s.mon1_ready & s.mon1_vok;
  assign vddio2_good = s.mon2_ready & s.mon2_vok;
  // ready of the regulator that is switched on
  assign vreg_ready  = (ctrl.vreg1_enable & s.vreg1_ready) | (ctrl.vreg2_enable & s.vreg2_ready);

  always_comb begin
    ctrl_nxt  = '0;
    state_nxt = state;
    unique case (state)
      ST_RESET: state_nxt = ST_MON_ON;

      ST_MON_ON: begin
        ctrl_nxt.mon1_enable = 1'b1;
        ctrl_nxt.mon2_enable = 1'b1;
        if (s.mon1_ready && s.mon2_ready) state_nxt = ST_MON_SELECT;
      end

      ST_MON_SELECT: begin
        ctrl_nxt.mon1_enable = 1'b1;
        ctrl_nxt.mon2_enable = 1'b1;
        if (vddio2_good)      state_nxt = ST_REF2_ON;
        else if (vddio1_good) state_nxt = ST_REF1_ON;
      end

      ST_REF1_ON: begin
        ctrl_nxt.ref1_enable = 1'b1;
        if (s.ref1_ready) state_nxt = ST_VREG1_ON;
      end

      ST_REF2_ON: begin
        ctrl_nxt.ref2_enable = 1'b1;
        if (s.ref2_ready) state_nxt = ST_VREG2_ON;
      end

      ST_VREG1_ON, ST_VREG2_ON: begin
        ctrl_nxt.ref1_enable  = (state == ST_VREG1_ON);
        ctrl_nxt.vreg1_enable = (state == ST_VREG1_ON);
        ctrl_nxt.ref2_enable  = (state == ST_VREG2_ON);
        ctrl_nxt.vreg2_enable = (state == ST_VREG2_ON);
        ctrl_nxt.mon3_enable  = 1'b1;
        ctrl_nxt.selvdd       = VDD_600;
        if (s.mon3_ready) state_nxt = ST_INC;
      end

      ST_INC: begin
        ctrl_nxt = ctrl;
        if (vreg_ready && s.mon3_ready && !s.mon3_vok && ctrl.selvdd != VDD_2000) begin
          ctrl_nxt.selvdd = ctrl.selvdd + 1'b1;
          state_nxt       = ST_INC2;
        end
      end

      ST_INC2: begin
        ctrl_nxt = ctrl;
        if (!vreg_ready) state_nxt = ST_INC;
      end

      default: state_nxt = ST_RESET;
    endcase
  end

  always_ff @(posedge clk or negedge porneg) begin
    if (!porneg) begin
      state <= ST_RESET;
      ctrl  <= '0;
    end else begin
      state <= state_nxt;
      ctrl  <= ctrl_nxt;
    end
  end
endmodule
