// tb_input_synchronizer: random input words must appear on the output
// exactly STAGES clock edges later (3 by default); reset clears all stages.
`timescale 1ns/1ps
module tb_input_synchronizer;
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
  logic       clk = 0, rst_n;
  logic [9:0] d, q;
  logic [9:0] hist [0:3];

  always #25 clk = ~clk;

  input_synchronizer dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  initial begin
    rst_n = 0; d = '1; #60;
    `CHECK(q == '0, "reset clears output")
    rst_n = 1;
    for (int i = 0; i < 4; i++) hist[i] = (i == 0) ? d : '0;
    repeat (100) begin
      @(negedge clk);
      d = 10'($urandom);
      @(posedge clk); #1;
      for (int i = 3; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = d;
      `CHECK(q == hist[2], $sformatf("q=%h expected input of 3 edges ago %h", q, hist[2]))
    end
    rst_n = 0; #1;
    `CHECK(q == '0, "asynchronous reset")
    report();
  end
  initial watchdog(100000);
endmodule
