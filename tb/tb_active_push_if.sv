// tb_active_push_if: the interface must push 1 (dt) when monitor 2 reports
// good, 0 (df) for monitor 1, prefer monitor 2 on a tie, push only once, and
// follow the 4-phase order with the controller's ack.
`timescale 1ns/1ps
module tb_active_push_if;
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
  logic activate, vok1, ready1, vok2, ready2, dt, df, ack;
  int   n_push = 0;

  active_push_if dut (.activate(activate), .vok1(vok1), .ready1(ready1), .vok2(vok2),
                      .ready2(ready2), .dt(dt), .df(df), .ack(ack));

  always @(posedge dt or posedge df) n_push++;
  always @(dt or df) begin checks++; if (dt && df) begin failures++; $display("FAIL: dt and df"); end end

  task automatic reset_all();
    activate = 0; vok1 = 0; ready1 = 0; vok2 = 0; ready2 = 0; ack = 0; #10;
    activate = 1; #10;
  endtask

  task automatic handshake(input bit exp_dt, input string tag);
    `CHECK(dt == exp_dt && df == !exp_dt, {tag, ": code"})
    ack = 1; #1;
    `CHECK(!dt && !df, {tag, ": spacer after ack"})
    ack = 0; #20;
    `CHECK(!dt && !df, {tag, ": stays idle"})
  endtask

  initial begin
    reset_all();
    `CHECK(!dt && !df, "idle after reset")
    ready1 = 1; #5; vok1 = 1; #5;
    handshake(1'b0, "monitor 1");
    vok2 = 1; ready2 = 1; #10;
    `CHECK(!dt && !df, "later monitor 2 does not push")

    reset_all();
    ready2 = 1; vok2 = 1; #10;
    handshake(1'b1, "monitor 2");

    reset_all();
    ready1 = 1; ready2 = 1; vok1 = 1; vok2 = 1; #10;
    handshake(1'b1, "tie");
    `CHECK(n_push == 3, $sformatf("three pushes, got %0d", n_push))
    report();
  end
  initial watchdog(10000);
endmodule
