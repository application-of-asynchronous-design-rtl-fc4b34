// tb_startup_logic_async: the testbench plays the analog side and the
// interface cells of every channel of the asynchronous controller.
//  - enable channels: acknowledge each dual-rail push, record the enable;
//  - ready channels: a fixed time after a cell is enabled (and after every
//    selvdd change for the enabled regulator) raise req, wait for ack,
//    drop req;
//  - vok channel: push which supply is good once both monitors are ready;
//  - vok3 channel: answer each pull with VDDCORE >= 1600 mV, where VDDCORE
//    is 600 + 200*selvdd mV (limited by MAXCORE).
// Runs: path 1, path 2, and a VDDCORE that can never be reached
// (selvdd must stop at 111 and the controller must not finish).
`timescale 1ns/1ps
module tb_startup_logic_async;
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

  logic                 activate_r = 1'b0, activate_a;
  logic [NUM_CELLS-1:0] en_dt, en_df, en_ack = '0, rdy_req = '0, rdy_ack;
  selvdd_t              selvdd_dt, selvdd_df;
  logic                 selvdd_ack = 1'b0;
  logic                 vok_dt = 1'b0, vok_df = 1'b0, vok_ack, vok3_req;
  logic                 vok3_dt = 1'b0, vok3_df = 1'b0;
  async_step_e          step;

  logic [NUM_CELLS-1:0] en_q = '0;
  selvdd_t              sel_q = '0;
  bit                   good2;            // which supply the vok push reports
  int unsigned          maxcore = 2000;   // highest VDDCORE the supply allows
  int                   n_sel = 0, n_vok3 = 0;
  int                   ord_ref = 0, ord_vreg = 0, ord_mon3 = 0, ord_cnt = 0;

  startup_logic_async dut (.*);

  // enable channels
  for (genvar i = 0; i < NUM_CELLS; i++) begin : g_en
    always begin
      wait (activate_r && (en_dt[i] || en_df[i]));
      checks++; if (en_dt[i] && en_df[i]) begin failures++; $display("FAIL: both rails %0d", i); end
      en_q[i] = en_dt[i];
      #2 en_ack[i] = 1'b1;
      wait (!en_dt[i] && !en_df[i]);
      #2 en_ack[i] = 1'b0;
    end
    // ready after the cell turned on
    always @(posedge en_q[i]) begin
      #(50 + 10 * i);
      if (en_q[i]) ready_hs(i);
    end
  end

  task automatic ready_hs(input int i);
    rdy_req[i] = 1'b1;
    wait (rdy_ack[i]);
    #2 rdy_req[i] = 1'b0;
    wait (!rdy_ack[i]);
  endtask

  // selvdd channel
  always begin
    wait (activate_r && (selvdd_dt != '0 || selvdd_df != '0));
    wait ((selvdd_dt ^ selvdd_df) == '1);
    checks++; if ((selvdd_dt & selvdd_df) != '0) begin failures++; $display("FAIL: selvdd rails"); end
    if (selvdd_dt != sel_q) begin
      sel_q = selvdd_dt;
      n_sel++;
      fork begin
        #30;
        if (en_q[CELL_VREG1]) ready_hs(CELL_VREG1);
        if (en_q[CELL_VREG2]) ready_hs(CELL_VREG2);
      end join_none
    end
    #2 selvdd_ack = 1'b1;
    wait (selvdd_dt == '0 && selvdd_df == '0);
    #2 selvdd_ack = 1'b0;
  end

  // vok push, once per run
  always @(posedge activate_r) begin
    wait (en_q[CELL_MON1] && en_q[CELL_MON2]);
    #200;
    vok_dt = good2; vok_df = !good2;
    wait (vok_ack);
    #2 vok_dt = 1'b0; vok_df = 1'b0;
    wait (!vok_ack);
  end

  // vok3 pull
  always begin
    int unsigned core;
    wait (activate_r && vok3_req);
    core = 600 + 200 * sel_q;
    if (core > maxcore) core = maxcore;
    n_vok3++;
    #2 begin vok3_dt = (core >= 1600); vok3_df = (core < 1600); end
    wait (!vok3_req);
    #2 begin vok3_dt = 1'b0; vok3_df = 1'b0; end
  end

  // order of events
  always @(posedge en_q[CELL_REF1] or posedge en_q[CELL_REF2]) ord_ref = ++ord_cnt;
  always @(posedge en_q[CELL_VREG1] or posedge en_q[CELL_VREG2]) ord_vreg = ++ord_cnt;
  always @(posedge en_q[CELL_MON3]) ord_mon3 = ++ord_cnt;

  task automatic run(input bit p2, input int unsigned mc, input selvdd_t exp_sel,
                     input bit exp_done, input string tag);
    activate_r = 1'b0; #50;
    `CHECK(step == AS_IDLE && !activate_a, {tag, ": idle while activate low"})
    good2 = p2; maxcore = mc; ord_cnt = 0; n_sel = 0;
    activate_r = 1'b1;
    #20000;
    `CHECK(activate_a == exp_done, {tag, ": done"})
    `CHECK(sel_q == exp_sel, $sformatf("%s: selvdd %0d expected %0d", tag, sel_q, exp_sel))
    `CHECK(n_sel == int'(exp_sel), $sformatf("%s: one push per step, got %0d", tag, n_sel))
    `CHECK(en_q[CELL_REF2] == p2 && en_q[CELL_VREG2] == p2 &&
           en_q[CELL_REF1] == !p2 && en_q[CELL_VREG1] == !p2, {tag, ": chosen path"})
    `CHECK(!en_q[CELL_MON1] && !en_q[CELL_MON2] && en_q[CELL_MON3], {tag, ": monitors"})
    `CHECK(ord_ref == 1 && ord_vreg == 2 && ord_mon3 == 3, {tag, ": reference, regulator, monitor 3 order"})
  endtask

  initial begin
    // clear what the previous run left enabled, as the real cells do in reset
    run(1'b0, 2000, 3'd5, 1'b1, "path 1");
    en_q = '0; sel_q = '0;
    run(1'b1, 2000, 3'd5, 1'b1, "path 2");
    en_q = '0; sel_q = '0;
    run(1'b0, 1300, 3'd7, 1'b0, "unreachable");
    `CHECK(step == AS_VREG_WAIT, "unreachable: waits for a regulator ready")
    `CHECK(n_vok3 > 0, "vok3 pulled")
    report();
  end
  initial watchdog(200000);
endmodule
