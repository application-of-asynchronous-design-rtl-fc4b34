// tb_sync_interface: a rising edge of ready must produce exactly one 4-phase
// request (req up, ack up, req down, ack down) and nothing more while ready
// stays high; activate low must hold req low.
`timescale 1ns/1ps
module tb_sync_interface;
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
  logic activate, ready, req, ack;
  int   n_req = 0;

  sync_interface dut (.activate(activate), .ready(ready), .req(req), .ack(ack));

  always @(posedge req) n_req++;

  initial begin
    activate = 0; ready = 0; ack = 0; #10;
    `CHECK(req == 0, "reset: req low")
    ready = 1; #10;
    `CHECK(req == 0, "no request while not activated")
    ready = 0; #10;
    activate = 1; #10;
    `CHECK(req == 0, "no request without a ready edge")
    ready = 1; #10;
    `CHECK(req == 1, "request after ready rises")
    #50;
    `CHECK(req == 1, "request held until acknowledged")
    ack = 1; #1;
    `CHECK(req == 0, "request falls after ack")
    ack = 0; #20;
    `CHECK(req == 0, "no new request while ready stays high")
    ready = 0; #10;
    ready = 1; #5;
    `CHECK(req == 1, "second edge gives second request")
    ack = 1; #1; ack = 0; #5;
    `CHECK(n_req == 2, $sformatf("two requests, got %0d", n_req))
    ready = 0; #5; ready = 1; #5;
    activate = 0; #1;
    `CHECK(req == 0, "reset clears a pending request")
    report();
  end
  initial watchdog(10000);
endmodule
