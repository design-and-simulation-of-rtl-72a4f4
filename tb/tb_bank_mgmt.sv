// tb_bank_mgmt: checks the bank management logic.  For each scenario it
// issues commands and measures, in cycles after the last command, when the
// bank may next take a read/write, a precharge or an activate, against the
// JEDEC timings at their defaults (tRCD 6, tRAS 15, tRP 6, tRC 21, tRTP 4,
// tWR 6, tRFC 64, CWL 5): activate, write recovery, read and write with
// auto-precharge, precharge, precharge-all and refresh; it also checks the
// open-row bookkeeping of every bank.
`timescale 1ns/1ps
module tb_bank_mgmt;
  import ddr3_pkg::*;
  logic                            clk = 0, rst_n = 0;
  mem_cmd_e                        cmd = CMD_NOP;
  logic [BANK_W-1:0]               ba = '0;
  logic [ADDR_W-1:0]               addr = '0;
  logic [3:0]                      cwl = 4'd5;
  logic [NUM_BANKS-1:0]            bank_open, can_act, can_rw, can_pre;
  logic [NUM_BANKS-1:0][ROW_W-1:0] bank_row;
  int checks = 0, failures = 0;

  bank_mgmt dut (.*);
  always #5 clk = ~clk;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input mem_cmd_e c, input int b, input int a = 0);
    @(negedge clk);
    cmd = c; ba = BANK_W'(b); addr = ADDR_W'(a);
    @(negedge clk);
    cmd = CMD_NOP;
  endtask

  // cycles after the last issue until can_* of bank b first goes high;
  // -1 if never within 100 cycles.  Sampling starts one cycle after issue.
  task automatic measure(input int b, output int rw, output int pre, output int act);
    rw = -1; pre = -1; act = -1;
    for (int n = 1; n <= 100; n++) begin
      #1;
      if (rw  < 0 && can_rw[b])  rw  = n;
      if (pre < 0 && can_pre[b]) pre = n;
      if (act < 0 && can_act[b]) act = n;
      @(negedge clk);
    end
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    int rw, pre, act;
    repeat (2) @(negedge clk);
    rst_n = 1;
    #1 check(bank_open == '0 && can_act == '1 && can_rw == '0 && can_pre == '0, "after reset");

    // ACT: read/write after tRCD, precharge after tRAS
    issue(CMD_ACT, 3, 77);
    #1 check(bank_open == 8'b0000_1000 && bank_row[3] == 14'd77, "ACT opens bank 3 row 77");
    @(negedge clk);
    measure(3, rw, pre, act);
    // measure started one cycle after issue: first ready cycle is T - 1 here
    check(rw == T_RCD - 1, $sformatf("read/write allowed %0d cycles after ACT", rw + 1));
    check(pre == T_RAS - 1, $sformatf("precharge allowed %0d cycles after ACT", pre + 1));
    check(act == -1, "open bank cannot be activated");

    // WR: precharge after CWL + 4 + tWR
    issue(CMD_WR, 3, 8);
    measure(3, rw, pre, act);
    check(pre == 5 + 4 + T_WR, $sformatf("write recovery %0d", pre));
    check(rw == 1, "open bank stays readable");

    // PRE: activate after tRP
    issue(CMD_PRE, 3);
    #1 check(!bank_open[3], "PRE closes bank 3");
    measure(3, rw, pre, act);
    check(act == T_RP, $sformatf("activate %0d cycles after PRE", act));

    // RDA late in tRAS: auto-precharge at tRTP, activate tRP later
    issue(CMD_ACT, 1, 5);
    wait_cycles(13);                               // RDA issued 14 cycles after ACT
    issue(CMD_RDA, 1);
    #1 check(!bank_open[1], "RDA closes bank 1");
    measure(1, rw, pre, act);
    check(act == T_RTP + T_RP, $sformatf("activate %0d cycles after RDA", act));

    // RDA early: auto-precharge waits for tRAS
    issue(CMD_ACT, 6, 9);
    wait_cycles(5);                                // RDA 6 cycles after ACT
    issue(CMD_RDA, 6);
    measure(6, rw, pre, act);
    check(act == T_RAS - 6 + T_RP, $sformatf("auto-precharge waits for tRAS: %0d", act));

    // WRA: activate after CWL + 4 + tWR + tRP
    issue(CMD_ACT, 2, 11);
    wait_cycles(5);
    issue(CMD_WRA, 2);
    measure(2, rw, pre, act);
    check(act == 5 + 4 + T_WR + T_RP, $sformatf("activate %0d cycles after WRA", act));

    // PREA closes every bank; REF then blocks activates for tRFC
    issue(CMD_ACT, 0, 1);
    wait_cycles(4);
    issue(CMD_ACT, 5, 2);
    #1 check(bank_open == 8'b0010_0001 && bank_row[0] == 14'd1 && bank_row[5] == 14'd2,
             "banks 0 and 5 open");
    wait_cycles(20);
    issue(CMD_PREA, 0);
    #1 check(bank_open == '0, "PREA closes every bank");
    measure(5, rw, pre, act);
    check(act == T_RP, $sformatf("activate %0d cycles after PREA", act));
    issue(CMD_REF, 0);
    measure(4, rw, pre, act);
    check(act == T_RFC, $sformatf("activate %0d cycles after REF", act));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
