// tb_por: porneg rises Tpor (100 ns) after the larger supply passes the
// 1000 mV threshold, and falls at once when both supplies drop below it.
`timescale 1ns/1ps
module tb_por;
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
  power_t p1, p2;
  logic   porneg;
  time    t0;

  por dut (.power1(p1), .power2(p2), .porneg(porneg));

  initial begin
    p1 = 0; p2 = 0; #50;
    `CHECK(!porneg, "low without supply")
    p1 = 999; #300;
    `CHECK(!porneg, "low below threshold")
    p1 = 1000; t0 = $time;
    wait (porneg);
    `CHECK($time - t0 >= 99 && $time - t0 <= 102, $sformatf("Tpor %0d ns", $time - t0))
    p2 = 3300; p1 = 0; #300;
    `CHECK(porneg, "other supply keeps porneg high")
    p2 = 500; #3;
    `CHECK(!porneg, "drops when both low")
    p2 = 2000; #50; p2 = 0; #10; p2 = 2000; t0 = $time;
    wait (porneg);
    `CHECK($time - t0 >= 99, "glitch restarts the delay")
    report();
  end
  initial watchdog(100000);
endmodule
