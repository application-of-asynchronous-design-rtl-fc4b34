// tb_voltage_regulator: 20 us start time, 1 us change time, the selvdd
// table 600..2000 mV, the output limited by the supply, and no output
// without a bandgap.
`timescale 1ns/1ps
module tb_voltage_regulator;
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
  power_t  pin, pout;
  logic    en, bg, ready;
  selvdd_t sel;
  time     t0;

  voltage_regulator dut (.powerin(pin), .powerout(pout), .enable(en), .bandgap(bg),
                         .selvdd(sel), .ready(ready));

  initial begin
    pin = 3300; en = 0; bg = 1; sel = 0; #100;
    `CHECK(pout == 0 && !ready, "off while disabled")
    en = 1; t0 = $time;
    wait (ready);
    `CHECK($time - t0 >= 19999 && $time - t0 <= 20002, $sformatf("TStart %0d", $time - t0))
    `CHECK(pout == 600, $sformatf("selvdd 000 -> %0d", pout))
    for (int s = 1; s < 8; s++) begin
      sel = selvdd_t'(s); #1;
      `CHECK(!ready, "ready drops on change")
      t0 = $time - 1;
      wait (ready);
      `CHECK($time - t0 >= 999 && $time - t0 <= 1002, $sformatf("TChange %0d", $time - t0))
      `CHECK(pout == 600 + 200 * s, $sformatf("selvdd %0d -> %0d mV", s, pout))
    end
    pin = 1500; #1500;
    `CHECK(pout == 1500, $sformatf("limited by supply: %0d", pout))
    bg = 0; #5;
    `CHECK(pout == 0 && !ready, "no output without bandgap")
    bg = 1; en = 0; #5; en = 1; #5000;
    `CHECK(!ready, "restart needs the full start time")
    report();
  end
  initial watchdog(200000);
endmodule
