// voltage_regulator: programmable voltage regulator (behavioural model of an
// analog cell).
//
// Enabled and given a bandgap, the regulator drives powerout to the selvdd
// level (000 = 600 mV ... 111 = 2000 mV in 200 mV steps), limited by its own
// supply. Without bandgap or enable the output is 0. After enable rises it
// needs TSTART_NS to reach the target; after a selvdd change ready drops and
// the output is updated within TCHANGE_NS (a change during start-up does not
// shorten the start-up). ready (1 = output settled) rises at the end of that
// time. The output itself reaches the new level TCHANGE_NS - TRISE_NS before
// ready rises (TRISE_NS into a change), so a monitor watching it has already
// seen the new level when ready rises.
// TStart = 20000 ns and TChange = 1000 ns are the specified values; TRISE_NS
// is this model's choice. The model runs on its own 1 ns time step and is for
// simulation only.
`timescale 1ns/1ps
module voltage_regulator
  import startup_pkg::*;
#(
  parameter int unsigned TSTART_NS  = 20000,
  parameter int unsigned TCHANGE_NS = 1000,
  parameter int unsigned TRISE_NS   = 500
) (
  input  power_t  powerin,
  output power_t  powerout,
  input  logic    enable,
  input  logic    bandgap,
  input  selvdd_t selvdd,
  output logic    ready
);
  logic        tick = 1'b0;
  logic        on, was_on = 1'b0;
  int unsigned busy_ns = 0;    // time left until the output has settled
  selvdd_t     sel_prev = '0;
  power_t      target, level = '0;

  always #0.5 tick = ~tick;

  assign on     = enable && bandgap;
  assign target = (selvdd_to_mv(selvdd) > powerin) ? powerin : selvdd_to_mv(selvdd);

  always @(posedge tick) begin
    sel_prev <= selvdd;
    was_on   <= on;
    if (!on) begin
      busy_ns <= 0;
      level   <= '0;
    end else if (!was_on) begin
      busy_ns <= TSTART_NS;
    end else if (selvdd != sel_prev && busy_ns < TCHANGE_NS) begin
      busy_ns <= TCHANGE_NS;
    end else if (busy_ns > 0) begin
      busy_ns <= busy_ns - 1;
      if (busy_ns <= TCHANGE_NS - TRISE_NS + 1) level <= target;
    end else begin
      level <= target;
    end
  end

  assign ready    = on && was_on && (busy_ns == 0) && (selvdd == sel_prev);
  assign powerout = level;
endmodule
