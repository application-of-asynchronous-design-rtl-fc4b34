// tb_mutex2: checks mutual exclusion, priority of request 1 on a tie, and
// that a grant is kept until its own request is withdrawn.
`timescale 1ns/1ps
module tb_mutex2;
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
  logic r1, r2, g1, g2;

  mutex2 dut (.r1(r1), .r2(r2), .g1(g1), .g2(g2));

  always @(g1 or g2) begin
    checks++;
    if (g1 && g2) begin failures++; $display("FAIL: both grants"); end
  end

  initial begin
    r1 = 0; r2 = 0; #1;
    `CHECK(!g1 && !g2, "idle")
    r1 = 1; r2 = 1; #1;
    `CHECK(g1 && !g2, "tie goes to request 1")
    r1 = 0; #1;
    `CHECK(!g1 && g2, "request 2 granted after request 1 leaves")
    r1 = 1; #1;
    `CHECK(!g1 && g2, "grant 2 kept while request 2 stays")
    r2 = 0; #1;
    `CHECK(g1 && !g2, "request 1 granted after request 2 leaves")
    r1 = 0; #1;
    `CHECK(!g1 && !g2, "idle again")
    r2 = 1; #1;
    `CHECK(!g1 && g2, "lone request 2 granted")
    r2 = 0; #1;
    repeat (300) begin
      r1 = 1'($urandom); r2 = 1'($urandom); #1;
      `CHECK(!(r1 || r2) || (g1 || g2), "some request is served")
      `CHECK((!g1 || r1) && (!g2 || r2), "grant only with request")
    end
    report();
  end
  initial watchdog(10000);
endmodule
