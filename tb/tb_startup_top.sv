// tb_startup_top: end-to-end test of both startup systems at full size.
//
// Both systems get the same supply ramps. Six power-up scenarios are run,
// each preceded by a power-down that must reset everything:
//   A  only VDDIO1 good (3300 mV)          -> reference/regulator 1
//   B  only VDDIO2 good (5000 mV)          -> reference/regulator 2
//   C  both good                           -> reference/regulator 2 (priority)
//   W  VDDIO1 at 1200 mV (POR released, not good): controllers must wait,
//      then VDDIO1 rises to 3300 mV         -> path 1
//   R  both supplies ramp 500 -> 900 -> 1500 -> 2000 mV in 18 us steps:
//      only VDDIO1 becomes good, at 2000 mV -> path 1
//   D  VDDIO1 good at selection, then sags to 1300 mV: VDDCORE cannot reach
//      1600 mV, selvdd must stop at 111
// Expected results are worked out from the selvdd table (600 + 200*code mV)
// and the 1600 mV VDDCORE threshold: VDDCORE ends at 1600 mV with selvdd 101.
// Every mechanism (wait in select, both paths, selvdd steps, INC2, reset,
// saturation, async done) is counted and must have happened at least once.
`timescale 1ns/1ps
module tb_startup_top;
  import startup_pkg::*;

  logic         clk = 1'b0;
  power_t       v1 = '0, v2 = '0;
  power_t       s_vddcore, a_vddcore;
  logic         s_porneg, a_porneg, a_done;
  analog_ctrl_t s_ctrl, a_ctrl;
  sync_state_e  s_state;
  async_step_e  a_step;

  int checks = 0, failures = 0;
  int n_wait = 0, n_path1 = 0, n_path2 = 0, n_inc_s = 0, n_inc_a = 0, n_inc2 = 0;
  int n_reset = 0, n_sat = 0, n_done = 0;

  always #25 clk = ~clk;  // 20 MHz

  startup_top dut (
    .clk(clk),
    .sync_vddio1(v1), .sync_vddio2(v2), .sync_vddcore(s_vddcore), .sync_porneg(s_porneg),
    .sync_ctrl(s_ctrl), .sync_state(s_state),
    .async_vddio1(v1), .async_vddio2(v2), .async_vddcore(a_vddcore), .async_porneg(a_porneg),
    .async_done(a_done), .async_ctrl(a_ctrl), .async_step(a_step));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // mechanism counters
  selvdd_t s_sel_prev = '0, a_sel_prev = '0;
  always @(s_ctrl.selvdd) begin
    if (s_ctrl.selvdd == s_sel_prev + 3'd1) n_inc_s++;
    s_sel_prev = s_ctrl.selvdd;
  end
  always @(a_ctrl.selvdd) begin
    if (a_ctrl.selvdd == a_sel_prev + 3'd1) n_inc_a++;
    a_sel_prev = a_ctrl.selvdd;
  end
  always @(posedge clk) if (s_state == ST_INC2) n_inc2++;
  always @(negedge s_porneg) n_reset++;
  always @(posedge a_done) n_done++;

  task automatic power_down();
    v1 = '0; v2 = '0;
    #2000;
    check(!s_porneg && !a_porneg, "POR asserted after power-down");
    check(s_ctrl == '0 && a_ctrl == '0, "all cells disabled in reset");
    check(s_state == ST_RESET && a_step == AS_IDLE, "controllers in reset");
    check(s_vddcore == '0 && a_vddcore == '0, "VDDCORE off in reset");
  endtask

  task automatic expect_end(input bit path2, input int unsigned exp_mv, input selvdd_t exp_sel,
                            input bit exp_done, input string tag);
    check(s_vddcore == power_t'(exp_mv), $sformatf("%s sync VDDCORE %0d, expected %0d", tag, s_vddcore, exp_mv));
    check(a_vddcore == power_t'(exp_mv), $sformatf("%s async VDDCORE %0d, expected %0d", tag, a_vddcore, exp_mv));
    check(s_ctrl.selvdd == exp_sel && a_ctrl.selvdd == exp_sel,
          $sformatf("%s selvdd sync %0d async %0d expected %0d", tag, s_ctrl.selvdd, a_ctrl.selvdd, exp_sel));
    check(s_ctrl.vreg2_enable == path2 && s_ctrl.vreg1_enable == !path2 &&
          s_ctrl.ref2_enable == path2 && s_ctrl.ref1_enable == !path2, {tag, " sync path"});
    check(a_ctrl.vreg2_enable == path2 && a_ctrl.vreg1_enable == !path2 &&
          a_ctrl.ref2_enable == path2 && a_ctrl.ref1_enable == !path2, {tag, " async path"});
    check(!s_ctrl.mon1_enable && !s_ctrl.mon2_enable && s_ctrl.mon3_enable, {tag, " sync monitors"});
    check(!a_ctrl.mon1_enable && !a_ctrl.mon2_enable && a_ctrl.mon3_enable, {tag, " async monitors"});
    check(s_state == ST_INC, {tag, " sync ends in INC"});
    check(a_done == exp_done, {tag, " async done"});
    if (path2) n_path2++; else n_path1++;
  endtask

  initial begin
    #100;
    power_down();

    // A: VDDIO1 only
    v1 = 16'd3300; #45000;
    expect_end(1'b0, 1600, 3'd5, 1'b1, "A");
    power_down();

    // B: VDDIO2 only
    v2 = 16'd5000; #45000;
    expect_end(1'b1, 1600, 3'd5, 1'b1, "B");
    power_down();

    // C: both
    v1 = 16'd3300; v2 = 16'd5000; #45000;
    expect_end(1'b1, 1600, 3'd5, 1'b1, "C");
    power_down();

    // W: neither good, then VDDIO1 good
    v1 = 16'd1200; #10000;
    check(s_porneg && a_porneg, "W: POR released at 1200 mV");
    check(s_state == ST_MON_SELECT, "W: sync waits in MON_SELECT");
    check(a_step == AS_SELECT, "W: async waits for the vok push");
    check(!s_ctrl.ref1_enable && !s_ctrl.ref2_enable && !a_ctrl.ref1_enable && !a_ctrl.ref2_enable,
          "W: no reference enabled while waiting");
    if (s_state == ST_MON_SELECT && a_step == AS_SELECT) n_wait++;
    v1 = 16'd3300; #45000;
    expect_end(1'b0, 1600, 3'd5, 1'b1, "W");
    power_down();

    // R: both supplies ramp together in steps of 500, 900, 1500, 2000 mV every
    // 18 us; VDDIO1 becomes good (>= 1600 mV) at the last step, VDDIO2 never
    v1 = 16'd500; v2 = 16'd500; #18000;
    v1 = 16'd900; v2 = 16'd900; #18000;
    check(!s_porneg && !a_porneg, "R: POR still active at 900 mV (threshold 1000 mV)");
    v1 = 16'd1500; v2 = 16'd1500; #18000;
    check(s_porneg && a_porneg, "R: POR released at 1500 mV");
    check(s_state == ST_MON_SELECT && a_step == AS_SELECT, "R: waiting at 1500 mV");
    if (s_state == ST_MON_SELECT && a_step == AS_SELECT) n_wait++;
    v1 = 16'd2000; v2 = 16'd2000; #45000;
    expect_end(1'b0, 1600, 3'd5, 1'b1, "R");
    power_down();
    // D: VDDIO1 sags after selection; selvdd saturates at 111
    v1 = 16'd3300;
    wait (s_ctrl.vreg1_enable && a_ctrl.vreg1_enable);
    v1 = 16'd1300;
    #45000;
    expect_end(1'b0, 1300, 3'd7, 1'b0, "D");
    if (s_ctrl.selvdd == 3'd7 && a_ctrl.selvdd == 3'd7) n_sat++;
    check(a_step == AS_VREG_WAIT, "D: async waits for a regulator ready that never comes");

    $display("mechanisms: wait=%0d path1=%0d path2=%0d inc_sync=%0d inc_async=%0d inc2_cycles=%0d reset=%0d saturate=%0d done=%0d",
             n_wait, n_path1, n_path2, n_inc_s, n_inc_a, n_inc2, n_reset, n_sat, n_done);
    check(n_wait > 0, "mechanism: wait for a good supply");
    check(n_path1 > 0 && n_path2 > 0, "mechanism: both supply paths");
    check(n_inc_s >= 5 * 4 && n_inc_a >= 5 * 4, "mechanism: selvdd steps");
    check(n_inc2 > 0, "mechanism: INC2 wait");
    check(n_reset >= 4, "mechanism: POR reset");
    check(n_sat > 0, "mechanism: selvdd saturation");
    check(n_done == 5, "mechanism: async done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #700000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
