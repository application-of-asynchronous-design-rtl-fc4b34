// tb_startup_logic_sync: the clocked controller against a simple model of
// the analog cells written in the testbench (ready a few cycles after the
// enable, regulator ready dropping for a few cycles after every selvdd
// change, monitor 3 good when 600 + 200*selvdd >= 1600 mV).
// Checks: reset state, the input synchronizer latency (a change is acted on
// at the 4th clock edge: 3 synchronizer stages plus the state register), the
// visited state sequence, both supply paths, the single step per regulator
// settle, and saturation of selvdd at 111.
`timescale 1ns/1ps
module tb_startup_logic_sync;
  import startup_pkg::*;
  // Check counters, CHECK macro, final report and watchdog.
  int checks = 0, failures = 0;

  `define CHECK(cond, msg) \
    begin checks++; if (!(cond)) begin failures++; $display("FAIL @%0t: %s", $time, msg); end end

  task automatic report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  task automatic watchdog(input longint unsigned ns);
    #(ns);
    failures++;
    $display("watchdog expired");
    report();
  endtask

  logic         clk = 1'b0, porneg = 1'b0;
  logic         mon1_vok = 0, mon1_ready = 0, mon2_vok = 0, mon2_ready = 0;
  logic         mon3_vok, mon3_ready, ref1_ready, ref2_ready, vreg1_ready, vreg2_ready;
  analog_ctrl_t ctrl;
  sync_state_e  state;
  int           maxcore = 2000;
  int           r1 = 0, r2 = 0, m3 = 0, v1 = 0, v2 = 0, vchg = 0;
  selvdd_t      sel_prev = '0;
  int           n_steps = 0;
  logic [15:0]  seen;

  always #25 clk = ~clk;

  startup_logic_sync dut (.*);

  // analog model: counters of cycles since enable
  always @(posedge clk) begin
    r1 <= ctrl.ref1_enable  ? r1 + 1 : 0;
    r2 <= ctrl.ref2_enable  ? r2 + 1 : 0;
    m3 <= ctrl.mon3_enable  ? m3 + 1 : 0;
    v1 <= ctrl.vreg1_enable ? v1 + 1 : 0;
    v2 <= ctrl.vreg2_enable ? v2 + 1 : 0;
    vchg <= (ctrl.selvdd != sel_prev) ? 0 : vchg + 1;
    if (ctrl.selvdd != sel_prev) n_steps++;
    sel_prev <= ctrl.selvdd;
    seen[state] <= 1'b1;
  end
  assign ref1_ready  = r1 > 5;
  assign ref2_ready  = r2 > 5;
  assign mon3_ready  = m3 > 3;
  assign vreg1_ready = v1 > 10 && vchg > 4 && ctrl.selvdd == sel_prev;
  assign vreg2_ready = v2 > 10 && vchg > 4 && ctrl.selvdd == sel_prev;
  assign mon3_vok    = mon3_ready && (ctrl.vreg1_enable || ctrl.vreg2_enable) &&
                       ((600 + 200 * int'(sel_prev) < maxcore ? 600 + 200 * int'(sel_prev) : maxcore) >= 1600);

  task automatic run(input bit p2, input int mc, input selvdd_t exp_sel, input string tag);
    int n;
    porneg = 1'b0; mon1_vok = 0; mon1_ready = 0; mon2_vok = 0; mon2_ready = 0;
    maxcore = mc;
    repeat (3) @(posedge clk);
    #1;
    `CHECK(state == ST_RESET && ctrl == '0, {tag, ": reset"})
    seen = '0; n_steps = 0;
    @(negedge clk) porneg = 1'b1;
    wait (ctrl.mon1_enable && ctrl.mon2_enable);
    repeat (5) @(negedge clk);
    `CHECK(state == ST_MON_ON, {tag, ": waits for the monitors to be ready"})
    mon1_ready = 1; mon2_ready = 1;
    wait (state == ST_MON_SELECT);
    `CHECK(ctrl.mon1_enable && ctrl.mon2_enable && !ctrl.ref1_enable && !ctrl.ref2_enable,
           {tag, ": monitors 1 and 2 on"})
    repeat (10) @(posedge clk);
    `CHECK(state == ST_MON_SELECT, {tag, ": waits without a good supply"})
    @(negedge clk);
    if (p2) mon2_vok = 1;
    else    mon1_vok = 1;
    n = 0;
    while (state == ST_MON_SELECT) begin @(posedge clk); #1; n++; end
    `CHECK(n == 4, $sformatf("%s: acted on at edge %0d, expected 4", tag, n))
    `CHECK(state == (p2 ? ST_REF2_ON : ST_REF1_ON), {tag, ": reference state"})
    repeat (400) @(posedge clk);
    #1;
    `CHECK(state == ST_INC, {tag, ": ends in INC"})
    `CHECK(ctrl.selvdd == exp_sel, $sformatf("%s: selvdd %0d expected %0d", tag, ctrl.selvdd, exp_sel))
    `CHECK(n_steps == int'(exp_sel), $sformatf("%s: %0d steps, expected %0d", tag, n_steps, exp_sel))
    `CHECK(ctrl.vreg2_enable == p2 && ctrl.ref2_enable == p2 &&
           ctrl.vreg1_enable == !p2 && ctrl.ref1_enable == !p2, {tag, ": path"})
    `CHECK(!ctrl.mon1_enable && !ctrl.mon2_enable && ctrl.mon3_enable, {tag, ": monitors"})
    `CHECK(seen[ST_MON_ON] && seen[p2 ? ST_VREG2_ON : ST_VREG1_ON] && seen[ST_INC] &&
           (exp_sel == 0 || seen[ST_INC2]), {tag, ": states visited"})
  endtask

  initial begin
    run(1'b0, 2000, 3'd5, "path 1");
    run(1'b1, 2000, 3'd5, "path 2");
    run(1'b0, 1300, 3'd7, "unreachable");
    report();
  end
  initial watchdog(200000);
endmodule
