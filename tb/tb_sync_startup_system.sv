// tb_sync_startup_system: the synchronous controller wired to the
// analog cell models. A power-down must reset everything; VDDIO1 alone must
// select reference/regulator 1, VDDIO2 (alone or with VDDIO1) path 2; in every
// case VDDCORE must end at 1600 mV with selvdd 101.
`timescale 1ns/1ps
module tb_sync_startup_system;
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


  logic clk = 1'b0;
  always #25 clk = ~clk;  // 20 MHz
  power_t       v1 = '0, v2 = '0, vddcore;
  logic         porneg;
  analog_ctrl_t ctrl;
  sync_state_e  st;

  sync_startup_system dut (.vddio1(v1), .vddio2(v2), .vddcore(vddcore), .porneg(porneg),
                         .ctrl(ctrl), .clk(clk), .state(st));

  task automatic run(input power_t a, input power_t b, input bit p2, input string tag);
    v1 = '0; v2 = '0; #2000;
    `CHECK(!porneg && ctrl == '0 && vddcore == '0 && st == ST_RESET, {tag, ": reset after power-down"})
    v1 = a; v2 = b; #45000;
    `CHECK(vddcore == 16'd1600, $sformatf("%s: VDDCORE %0d", tag, vddcore))
    `CHECK(ctrl.selvdd == 3'd5, $sformatf("%s: selvdd %0d", tag, ctrl.selvdd))
    `CHECK(ctrl.vreg2_enable == p2 && ctrl.vreg1_enable == !p2 && ctrl.ref2_enable == p2 &&
           ctrl.ref1_enable == !p2, {tag, ": path"})
    `CHECK(!ctrl.mon1_enable && !ctrl.mon2_enable && ctrl.mon3_enable, {tag, ": monitors"})
    `CHECK(st == ST_INC, {tag, ": finished"})
  endtask

  initial begin
    run(16'd3300, 16'd0,    1'b0, "VDDIO1");
    run(16'd0,    16'd5000, 1'b1, "VDDIO2");
    run(16'd3300, 16'd5000, 1'b1, "both");
    report();
  end
  initial watchdog(300000);
endmodule
