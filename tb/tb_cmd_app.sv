// tb_cmd_app: checks the command application logic with the bank
// management and command decode blocks around it.  Every command it issues
// is logged with its cycle; each scenario then checks the command sequence
// and the spacing against the JEDEC timings at their defaults:
//   forwarding of initialization commands and latching of CL/CWL/BL from
//   the MR0/MR2 values on the bus;
//   read to a closed bank (ACT, tRCD, RD), row hit (tCCD), row miss (PRE
//   after tRAS, ACT after tRP), read-to-write and write-to-read turnaround;
//   run-time MRS (PREA, tRP, MRS with the configured value, tMOD);
//   periodic refresh with a row open (PREA, REF, tRFC);
//   self-refresh entry and exit (REF with CKE low, tCKESR, tXS) and
//   power-down entry and exit (CKE low, tCKE, tXP).
`timescale 1ns/1ps
module tb_cmd_app;
  import ddr3_pkg::*;

  typedef struct { int t; mem_cmd_e c; int ba; int addr; bit cke; } ev_t;

  logic                            clk = 0, rst_n = 0;
  logic                            init_done = 0;
  mem_cmd_e                        init_cmd = CMD_NOP;
  logic [BANK_W-1:0]               init_ba = '0;
  logic [ADDR_W-1:0]               init_addr = '0;
  logic                            init_cke = 0;
  logic                            init_restart;
  cfg_t                            cfg;
  logic                            req_valid = 0;
  user_req_t                       req;
  logic                            dec_valid, pop;
  dec_req_t                        dec;
  logic [NUM_BANKS-1:0]            bank_open, can_act, can_rw, can_pre;
  logic [NUM_BANKS-1:0][ROW_W-1:0] bank_row;
  mem_cmd_e                        cmd;
  logic [BANK_W-1:0]               ba;
  logic [ADDR_W-1:0]               addr;
  logic                            cke, wr_issue, rd_issue, bc4;
  logic [3:0]                      cl, cwl;
  logic                            in_self_refresh, in_power_down, refresh_pending;

  cmd_decode u_dec (.req_valid, .req, .bank_open, .bank_row, .dec_valid, .dec);
  bank_mgmt  u_bm  (.clk, .rst_n, .cmd, .ba, .addr, .cwl, .bank_open, .bank_row,
                    .can_act, .can_rw, .can_pre);
  cmd_app    dut   (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, n_restart = 0;
  ev_t log_q [$];
  bit cke_q = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  // log at the end of every cycle
  always @(negedge clk) begin
    cyc++;
    if (cmd != CMD_NOP || cke != cke_q)
      log_q.push_back('{t: cyc, c: cmd, ba: int'(ba), addr: int'(addr), cke: cke});
    cke_q = cke;
  end

  always @(posedge clk) if (rst_n && init_restart) n_restart++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic request(input user_op_e op, input int row, input int bank, input int cb);
    @(posedge clk); #1;
    req_valid = 1;
    req.op = op;
    req.addr = {ROW_W'(row), BANK_W'(bank), CBURST_W'(cb)};
    req.wdata = '0;
    forever begin
      @(negedge clk);
      if (pop) break;
    end
    @(posedge clk); #1 req_valid = 0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  // the k-th logged event from index i on (non-NOP or CKE change)
  function automatic ev_t ev(input int i);
    return log_q[i];
  endfunction

  initial begin
    int i0;
    cfg = '{bl: 2'b00, cl: 4'd6, cwl: 4'd5, ref_en: 1'b0, odt_en: 1'b1, dyn_odt_en: 1'b1,
            rtt_nom: 3'b001, rtt_wr: 2'b01, refi16: 8'd195};
    req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ------------------------------------------- initialization forwarding
    @(negedge clk);
    init_cke = 1; init_cmd = CMD_MRS; init_ba = 3'd2; init_addr = 14'h0018;   // CWL 8
    #1 check(cmd == CMD_MRS && ba == 3'd2 && addr == 14'h0018 && cke, "init command forwarded");
    @(negedge clk);
    init_ba = 3'd0; init_addr = 14'h0052;                                     // CL 9, BC4
    @(negedge clk);
    init_cmd = CMD_NOP;
    #1 check(cl == 4'd9 && cwl == 4'd8 && bc4, "CL/CWL/BL latched from MR0/MR2");
    @(negedge clk);
    init_cmd = CMD_MRS; init_ba = 3'd2; init_addr = mr2_value(cfg);
    @(negedge clk);
    init_ba = 3'd0; init_addr = mr0_value(cfg, 1'b1);
    @(negedge clk);
    init_cmd = CMD_NOP;
    #1 check(cl == 4'd6 && cwl == 4'd5 && !bc4, "CL 6 / CWL 5 / BL8 latched");
    idle(12);
    init_done = 1;
    idle(2);

    // -------------------------------------------------- closed bank, hit
    i0 = log_q.size();
    request(OP_READ, 5, 0, 0);
    request(OP_READ, 5, 0, 1);
    idle(10);
    check(log_q.size() - i0 == 3, "ACT, RD, RD");
    check(ev(i0).c == CMD_ACT && ev(i0).ba == 0 && ev(i0).addr == 5, "ACT bank 0 row 5");
    check(ev(i0+1).c == CMD_RD && ev(i0+1).t - ev(i0).t == T_RCD && ev(i0+1).addr == 0,
          $sformatf("RD %0d cycles after ACT", ev(i0+1).t - ev(i0).t));
    check(ev(i0+2).c == CMD_RD && ev(i0+2).t - ev(i0+1).t == T_CCD && ev(i0+2).addr == 8,
          "row hit RD tCCD later");

    // ------------------------------------------- row miss, turnarounds
    i0 = log_q.size();
    request(OP_WRITE, 9, 0, 2);
    request(OP_READ, 9, 0, 2);
    idle(20);
    check(log_q.size() - i0 == 4, "PRE, ACT, WR, RD");
    check(ev(i0).c == CMD_PRE && ev(i0).ba == 0, "row miss precharges bank 0");
    check(ev(i0).t - log_q[i0-3].t >= T_RAS, "PRE after tRAS");
    check(ev(i0+1).c == CMD_ACT && ev(i0+1).t - ev(i0).t == T_RP && ev(i0+1).addr == 9,
          "ACT row 9 tRP after PRE");
    check(ev(i0+2).c == CMD_WR && ev(i0+2).t - ev(i0+1).t == T_RCD, "WR tRCD after ACT");
    check(ev(i0+3).c == CMD_RD && ev(i0+3).t - ev(i0+2).t == 5 + 4 + T_WTR,
          $sformatf("write-to-read %0d", ev(i0+3).t - ev(i0+2).t));
    i0 = log_q.size();
    request(OP_READ, 9, 0, 3);
    request(OP_WRITE_AP, 9, 0, 4);
    idle(40);
    check(ev(i0).c == CMD_RD && ev(i0+1).c == CMD_WRA &&
          ev(i0+1).t - ev(i0).t == 6 + T_CCD + 2 - 5,
          $sformatf("read-to-write %0d", ev(i0+1).t - ev(i0).t));
    check(!bank_open[0], "WRA leaves the bank closed");

    // -------------------------------------------------------- run-time MRS
    request(OP_READ, 3, 4, 0);
    cfg.cl = 4'd8;
    i0 = log_q.size();
    request(OP_MRS, 0, 0, 0);
    request(OP_READ, 3, 4, 0);
    idle(40);
    check(ev(i0).c == CMD_PREA, "MRS first closes the open bank");
    check(ev(i0+1).c == CMD_MRS && ev(i0+1).ba == 0 && ev(i0+1).t - ev(i0).t == T_RP &&
          ev(i0+1).addr == int'(mr0_value(cfg, 1'b0)), "MRS MR0 with the configured value");
    check(ev(i0+2).c == CMD_ACT && ev(i0+2).t - ev(i0+1).t == T_MOD, "tMOD after MRS");
    check(cl == 4'd8, "new CL in force");

    // ------------------------------------------------------------- refresh
    cfg.refi16 = 8'd3;
    cfg.ref_en = 1'b1;
    i0 = log_q.size();
    idle(60);
    cfg.ref_en = 1'b0;
    check(ev(i0).c == CMD_PREA && ev(i0+1).c == CMD_REF && ev(i0+1).t - ev(i0).t == T_RP,
          "refresh: PREA, then REF after tRP");
    idle(80);
    i0 = log_q.size();
    request(OP_READ, 3, 4, 0);
    idle(10);
    check(ev(i0).c == CMD_ACT, "access after refresh activates again");

    // -------------------------------------------------------- self-refresh
    i0 = log_q.size();
    request(OP_SELF_REFRESH, 0, 0, 0);
    idle(30);
    check(ev(i0).c == CMD_PREA && ev(i0+1).c == CMD_REF && !ev(i0+1).cke,
          "self-refresh entry: REF with CKE low");
    check(in_self_refresh && !cke, "in self-refresh");
    request(OP_READ, 3, 4, 0);
    idle(10);
    check(ev(i0+2).cke && ev(i0+2).t - ev(i0+1).t >= T_CKESR, "self-refresh exit after tCKESR");
    check(ev(i0+3).c == CMD_ACT && ev(i0+3).t - ev(i0+2).t == T_XS, "tXS after exit");

    // ---------------------------------------------------------- power-down
    i0 = log_q.size();
    request(OP_POWER_DOWN, 0, 0, 0);
    idle(30);
    check(ev(i0).c == CMD_PREA && ev(i0+1).c == CMD_NOP && !ev(i0+1).cke,
          "power-down entry: CKE low with NOP");
    check(in_power_down, "in power-down");
    request(OP_WRITE, 3, 4, 0);
    idle(10);
    check(ev(i0+2).cke && ev(i0+3).c == CMD_ACT && ev(i0+3).t - ev(i0+2).t == T_XP,
          "tXP after power-down exit");

    // -------------------------------------------------------- memory reset
    idle(30);
    i0 = log_q.size();
    init_done = 0;                       // as the init FSM will show once restarted
    init_cmd = CMD_NOP; init_cke = 0;
    check(n_restart == 0, "no restart before the reset request");
    request(OP_MEM_RESET, 0, 0, 0);
    idle(5);
    check(ev(i0).c == CMD_PREA, "memory reset closes the open rows first");
    check(n_restart == 1, "one restart pulse to the init FSM");
    check(!cke && !in_power_down && !in_self_refresh, "init commands forwarded again (CKE low)");
    init_cke = 1; init_done = 1;
    idle(5);
    i0 = log_q.size();
    request(OP_READ, 3, 4, 0);
    idle(20);
    check(ev(i0).c == CMD_ACT && ev(i0+1).c == CMD_RD, "normal operation after re-initialization");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
