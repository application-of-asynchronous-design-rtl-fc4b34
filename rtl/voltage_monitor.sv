// voltage_monitor: supply voltage monitor (behavioural model of an analog cell).
//
// When enable rises the cell needs TREADY_NS to start; ready then goes to 1.
// vok reports whether the monitored supply is at or above VTHRESHOLD_MV, and
// follows a change of the comparison only after it has been stable for
// TMEASURE_NS. While disabled, or before ready, both outputs are 0.
// Defaults (1000 mV, 1000 ns, 100 ns) are the specified cell parameters; the
// system sets the threshold per instance (1600/3300/1600 mV). The model runs
// on its own 1 ns time step and is for simulation only.
`timescale 1ns/1ps
module voltage_monitor
  import startup_pkg::*;
#(
  parameter int unsigned VTHRESHOLD_MV = 1000,
  parameter int unsigned TREADY_NS     = 1000,
  parameter int unsigned TMEASURE_NS   = 100
) (
  input  power_t power,
  input  logic   enable,
  output logic   ready,
  output logic   vok
);
  logic        tick = 1'b0;
  int unsigned on_ns = 0, stable_ns = 0;
  logic        cmp, cmp_prev = 1'b0, vok_r = 1'b0;

  always #0.5 tick = ~tick;

  assign cmp   = (power >= power_t'(VTHRESHOLD_MV));
  assign ready = enable && (on_ns >= TREADY_NS);
  assign vok   = ready && vok_r;

  always @(posedge tick) begin
    cmp_prev <= cmp;
    if (!enable) begin
      on_ns     <= 0;
      stable_ns <= 0;
      vok_r     <= 1'b0;
    end else begin
      if (on_ns < TREADY_NS) on_ns <= on_ns + 1;
      if (cmp != cmp_prev)             stable_ns <= 0;
      else if (stable_ns < TMEASURE_NS) stable_ns <= stable_ns + 1;
      if (!ready)                                         vok_r <= 1'b0;
      else if (cmp == cmp_prev && stable_ns + 1 >= TMEASURE_NS) vok_r <= cmp;
    end
  end
endmodule
