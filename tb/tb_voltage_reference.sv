// tb_voltage_reference: bandgap/ready 2000 ns after enable with enough
// supply; never without supply; cleared on disable.
`timescale 1ns/1ps
module tb_voltage_reference;
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
  power_t p;
  logic   en, bg, ready;
  time    t0;

  voltage_reference dut (.powerin(p), .enable(en), .bandgap(bg), .ready(ready));

  initial begin
    p = 0; en = 1; #3000;
    `CHECK(!ready && !bg, "no output without supply")
    p = 3300; t0 = $time;
    wait (ready);
    `CHECK($time - t0 >= 1999 && $time - t0 <= 2002, $sformatf("TReady %0d", $time - t0))
    `CHECK(bg, "bandgap with ready")
    en = 0; #2;
    `CHECK(!ready && !bg, "disable clears")
    en = 1; #1000;
    `CHECK(!ready, "restarts the delay")
    #1100;
    `CHECK(ready, "ready again")
    report();
  end
  initial watchdog(100000);
endmodule
