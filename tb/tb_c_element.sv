// tb_c_element: drives every input sequence of the C-element truth table and
// compares the output with a reference model (set on 1/1, clear on 0/0, hold
// otherwise).
`timescale 1ns/1ps
module tb_c_element;
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
  logic a, b, y, ref_y;

  c_element dut (.a(a), .b(b), .y(y));

  initial begin
    a = 0; b = 0; ref_y = 0; #1;
    `CHECK(y == 1'b0, "0/0 gives 0")
    repeat (200) begin
      a = 1'($urandom); b = 1'($urandom);
      if (a == b) ref_y = a;
      #1;
      `CHECK(y == ref_y, $sformatf("a=%b b=%b y=%b expected %b", a, b, y, ref_y))
    end
    // explicit hold cases
    a = 1; b = 1; #1; a = 0; #1; `CHECK(y == 1'b1, "holds 1 on 0/1")
    a = 1; b = 0; #1; `CHECK(y == 1'b1, "holds 1 on 1/0")
    a = 0; #1; `CHECK(y == 1'b0, "clears on 0/0")
    a = 1; #1; `CHECK(y == 1'b0, "holds 0 on 1/0")
    report();
  end
  initial watchdog(10000);
endmodule
