// startup_pkg: types and constants shared by the microcontroller startup system.
//
// Supplies are carried between the behavioural analog cells as unsigned
// millivolt numbers (power_t). The regulator output level is chosen by a
// 3-bit selvdd code, 600 mV for 000 rising in 200 mV steps to 2000 mV for 111.
// The state encoding of the clocked controller and the step encoding of the
// clockless controller live here so that testbenches can name them.
// The 16-bit supply width is this design's choice; the selvdd table and the
// thresholds are those of the specification.
`timescale 1ns/1ps
package startup_pkg;

  localparam int unsigned POWER_BITS  = 16;  // supply value in mV
  localparam int unsigned SELVDD_BITS = 3;

  typedef logic [POWER_BITS-1:0]  power_t;
  typedef logic [SELVDD_BITS-1:0] selvdd_t;

  localparam selvdd_t VDD_600  = 3'd0;
  localparam selvdd_t VDD_2000 = 3'd7;

  // Output of the regulator for a selvdd code (bandgap present).
  function automatic power_t selvdd_to_mv(selvdd_t s);
    return power_t'(600 + 200 * int'(s));
  endfunction

  // Thresholds of the startup specification, in mV.
  localparam int unsigned POR_THRESHOLD_MV  = 1000;
  localparam int unsigned VDDIO1_GOOD_MV    = 1600;
  localparam int unsigned VDDIO2_GOOD_MV    = 3300;
  localparam int unsigned VDDCORE_OK_MV     = 1600;

  // States of the clocked controller.
  typedef enum logic [3:0] {
    ST_RESET      = 4'd0,
    ST_MON_ON     = 4'd1,
    ST_MON_SELECT = 4'd2,
    ST_REF1_ON    = 4'd3,
    ST_REF2_ON    = 4'd4,
    ST_VREG1_ON   = 4'd5,
    ST_VREG2_ON   = 4'd6,
    ST_INC        = 4'd7,
    ST_INC2       = 4'd8
  } sync_state_e;

  // Steps of the clockless controller. A step name ending in _R is the
  // return-to-zero half of the step before it.
  typedef enum logic [4:0] {
    AS_IDLE,
    AS_MON_ON,    AS_MON_ON_R,
    AS_SELECT,    AS_SELECT_R,
    AS_REF_ON,    AS_REF_ON_R,
    AS_VREG_ON,   AS_VREG_ON_R,
    AS_MON_OFF,   AS_MON_OFF_R,
    AS_MON3_ON,   AS_MON3_ON_R,
    AS_TEST,
    AS_SEL_PUSH,  AS_SEL_PUSH_R,
    AS_VREG_WAIT, AS_VREG_WAIT_R,
    AS_VOK3,      AS_VOK3_R,
    AS_DONE
  } async_step_e;

  // The analog cells the controllers switch on, each with an enable input and
  // a ready output. Used as an index into the per-cell channel arrays.
  typedef enum logic [2:0] {
    CELL_MON1  = 3'd0,
    CELL_MON2  = 3'd1,
    CELL_MON3  = 3'd2,
    CELL_REF1  = 3'd3,
    CELL_REF2  = 3'd4,
    CELL_VREG1 = 3'd5,
    CELL_VREG2 = 3'd6
  } cell_e;
  localparam int unsigned NUM_CELLS = 7;

  // Enables and selvdd driven by either controller, as one bundle.
  typedef struct packed {
    logic    mon1_enable;
    logic    mon2_enable;
    logic    mon3_enable;
    logic    ref1_enable;
    logic    ref2_enable;
    logic    vreg1_enable;
    logic    vreg2_enable;
    selvdd_t selvdd;
  } analog_ctrl_t;

endpackage
