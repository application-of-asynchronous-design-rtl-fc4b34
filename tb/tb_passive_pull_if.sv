// tb_passive_pull_if: pulls the level through both interface variants and
// checks the dual-rail code, the spacer while req is low, and that only the
// latched variant ignores a change of the level while req is high.
`timescale 1ns/1ps
module tb_passive_pull_if;
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
  logic data, req, dt, df, dt_s, df_s;

  passive_pull_if dut (.data(data), .req(req), .dt(dt), .df(df));
  passive_pull_if #(.LATCHED(1'b0)) dut_s (.data(data), .req(req), .dt(dt_s), .df(df_s));

  initial begin
    data = 0; req = 0; #1;
    `CHECK(!dt && !df && !dt_s && !df_s, "spacer while req low")
    repeat (40) begin
      data = 1'($urandom); #1;
      req = 1; #1;
      `CHECK(dt == data && df == !data, "latched: code of the level")
      `CHECK(dt_s == data && df_s == !data, "simple: code of the level")
      req = 0; #1;
      `CHECK(!dt && !df, "latched: spacer after req")
    end
    data = 1; #1; req = 1; #1;
    data = 0; #1;
    `CHECK(dt == 1 && df == 0, "latched: code frozen while req high")
    `CHECK(dt_s == 0 && df_s == 1, "simple: code follows the level")
    req = 0; #1; req = 1; #1;
    `CHECK(dt == 0 && df == 1, "latched: new level on next pull")
    report();
  end
  initial watchdog(10000);
endmodule
