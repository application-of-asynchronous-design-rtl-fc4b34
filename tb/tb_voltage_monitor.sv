// tb_voltage_monitor: ready 1000 ns after enable, vok only when ready and
// the supply is at or above the threshold, vok changes after the 100 ns
// measure time, and disable clears both outputs.
`timescale 1ns/1ps
module tb_voltage_monitor;
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
  logic   en, ready, vok;
  time    t0;

  voltage_monitor #(.VTHRESHOLD_MV(1600)) dut (.power(p), .enable(en), .ready(ready), .vok(vok));

  initial begin
    p = 3300; en = 0; #200;
    `CHECK(!ready && !vok, "off while disabled")
    en = 1; t0 = $time;
    wait (ready);
    `CHECK($time - t0 >= 999 && $time - t0 <= 1002, $sformatf("TReady %0d", $time - t0))
    #2; `CHECK(vok, "vok with supply above threshold")
    p = 1000; t0 = $time;
    wait (!vok);
    `CHECK($time - t0 >= 99 && $time - t0 <= 102, $sformatf("TMeasure fall %0d", $time - t0))
    `CHECK(ready, "ready stays high")
    p = 1600; t0 = $time;
    wait (vok);
    `CHECK($time - t0 >= 99 && $time - t0 <= 102, "TMeasure rise at the threshold")
    p = 1000; #50; p = 3300; #200;
    `CHECK(vok, "short dip filtered")
    en = 0; #2;
    `CHECK(!ready && !vok, "disable clears")
    p = 1200; en = 1; #1100;
    `CHECK(ready && !vok, "ready but supply low")
    report();
  end
  initial watchdog(100000);
endmodule
