// tb_passive_push_if: pushes random 3-bit words through the 4-phase
// dual-rail protocol and checks the acknowledge at each phase and that the
// output keeps the last word between pushes; also the 1-bit default.
`timescale 1ns/1ps
module tb_passive_push_if;
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
  logic       rst_n;
  logic [2:0] dt, df, data;
  logic       ack;
  logic       dt1, df1, ack1, data1;

  passive_push_if #(.WIDTH(3)) dut (.rst_n(rst_n), .dt(dt), .df(df), .ack(ack), .data(data));
  passive_push_if dut1 (.rst_n(rst_n), .dt(dt1), .df(df1), .ack(ack1), .data(data1));

  initial begin
    logic [2:0] w;
    rst_n = 0; dt = 0; df = 0; dt1 = 0; df1 = 0; #2;
    `CHECK(data == 3'b000 && data1 == 1'b0 && !ack && !ack1, "reset state")
    rst_n = 1; #2;
    repeat (50) begin
      w = 3'($urandom);
      dt = w; df = ~w; #1;
      `CHECK(ack == 1'b1, "ack after valid word")
      `CHECK(data == w, $sformatf("data %b expected %b", data, w))
      dt = 0; df = 0; #1;
      `CHECK(ack == 1'b0, "ack low on spacer")
      `CHECK(data == w, "data held on spacer")
    end
    // partial word: ack must stay low until every bit is valid
    dt = 3'b001; df = 3'b000; #1;
    `CHECK(ack == 1'b0, "no ack with incomplete word")
    df = 3'b110; #1;
    `CHECK(ack == 1'b1 && data == 3'b001, "ack once complete")
    dt = 0; df = 0; #1;
    // 1-bit instance
    dt1 = 1; #1; `CHECK(ack1 && data1, "1-bit push 1")
    dt1 = 0; #1; `CHECK(!ack1 && data1, "1-bit spacer holds 1")
    df1 = 1; #1; `CHECK(ack1 && !data1, "1-bit push 0")
    df1 = 0; #1; `CHECK(!ack1 && !data1, "1-bit spacer holds 0")
    report();
  end
  initial watchdog(10000);
endmodule
