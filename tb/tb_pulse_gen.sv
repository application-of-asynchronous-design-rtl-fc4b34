// tb_pulse_gen: a rising edge must give one pulse of PULSE_NS, a falling edge
// none.
`timescale 1ns/1ps
module tb_pulse_gen;
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
  logic a, y;
  int   n_rise = 0;
  realtime t_rise;

  pulse_gen #(.PULSE_NS(3)) dut (.a(a), .y(y));

  always @(posedge y) begin n_rise++; t_rise = $realtime; end
  always @(negedge y) if (n_rise > 0) `CHECK($realtime - t_rise == 3.0, $sformatf("pulse width %0t", $realtime - t_rise))

  initial begin
    a = 0; #10;
    `CHECK(y == 0, "idle low")
    a = 1; #1;
    `CHECK(y == 1, "pulse after rising edge")
    #5;
    `CHECK(y == 0, "pulse ended while input stays high")
    a = 0; #1;
    `CHECK(y == 0, "no pulse on falling edge")
    #10;
    repeat (5) begin a = 1; #10; a = 0; #10; end
    `CHECK(n_rise == 6, $sformatf("one pulse per rising edge, got %0d", n_rise))
    report();
  end
  initial watchdog(10000);
endmodule
