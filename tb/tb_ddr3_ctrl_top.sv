// tb_ddr3_ctrl_top: end-to-end test of the DDR3 controller against the
// behavioural memory model.
//
// The memory model checks every JEDEC rule it knows and counts violations;
// this bench keeps its own copy of everything written and compares each
// read burst, in order.  It makes every mechanism of the controller happen
// and counts it: initialization, configuration load/fetch, activates for
// closed banks, row hits, row misses (precharge), auto-precharge reads and
// writes, back-to-back bursts, write-to-read and read-to-write turnaround,
// a full command queue, periodic refresh (also with rows open), a mode
// register change of CL/CWL at run time, a burst-chop (BC4) mode switch,
// self-refresh, power-down left for a refresh, ODT windows, and a memory
// reset with re-initialization in the middle of operation.  A mechanism
// that never happened counts as a failure.  The two power-up waits are
// shortened; the refresh interval is set to 20 x 16 cycles through the
// configuration interface so refreshes interleave with traffic.
`timescale 1ns/1ps
module tb_ddr3_ctrl_top;
  import ddr3_pkg::*;

  localparam int unsigned RST_CYC  = 40;
  localparam int unsigned CKE_CYC  = 60;
  localparam int unsigned REFI16   = 20;

  logic               clk_in = 0, rst_n = 1;
  logic [7:0]         sync_factor = 8'd1;
  logic               ctrl_clk, ctrl_rst_n;
  logic [3:0]         cfg_register_number = '0;
  logic [7:0]         cfg_in_value = '0;
  logic               cfg_load = 0, cfg_fetch = 0;
  logic [7:0]         cfg_out_value;
  logic               req_valid = 0, req_ready;
  user_op_e           req_op = OP_READ;
  logic [UADDR_W-1:0] req_addr = '0;
  logic [WORD_W-1:0]  req_wdata = '0;
  logic               rd_valid;
  logic [WORD_W-1:0]  rd_data;
  logic               init_done, self_refresh, power_down;
  logic               ddr_ck, ddr_reset_n, ddr_cke, ddr_cs_n, ddr_ras_n, ddr_cas_n, ddr_we_n;
  logic [BANK_W-1:0]  ddr_ba;
  logic [ADDR_W-1:0]  ddr_addr;
  logic               ddr_odt, mem_wrdata_en, mem_rddata_valid;
  logic [WORD_W-1:0]  mem_wrdata, mem_rddata;

  ddr3_ctrl_top #(.P_RESET(RST_CYC), .P_CKEON(CKE_CYC)) dut (.*);

  ddr3_mem_model #(.P_RESET(RST_CYC), .P_CKEON(CKE_CYC)) mem (
    .ck(ddr_ck), .reset_n(ddr_reset_n), .cke(ddr_cke), .cs_n(ddr_cs_n),
    .ras_n(ddr_ras_n), .cas_n(ddr_cas_n), .we_n(ddr_we_n), .ba(ddr_ba),
    .addr(ddr_addr), .odt(ddr_odt), .wrdata_en(mem_wrdata_en),
    .wrdata(mem_wrdata), .rddata_valid(mem_rddata_valid), .rddata(mem_rddata)
  );

  always #0.625 clk_in = ~clk_in;   // 800 MHz in, 400 MHz memory clock

  int checks = 0, failures = 0;
  int full_cycles = 0, rd_returned = 0;
  longint cycles = 0;

  logic [WORD_W-1:0] ref_mem [int unsigned];
  logic [WORD_W-1:0] exp_q [$];

  always @(posedge ctrl_clk) cycles++;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endfunction

  function automatic logic [UADDR_W-1:0] mk(input int row, input int bank, input int cb);
    return {ROW_W'(row), BANK_W'(bank), CBURST_W'(cb)};
  endfunction

  function automatic logic [WORD_W-1:0] rnd_word();
    logic [WORD_W-1:0] v;
    for (int i = 0; i < WORD_W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // read data checker
  bit started = 0;                      // set once the controller is out of reset
  always @(negedge ctrl_clk) if (started && rd_valid && init_done) begin
    rd_returned++;
    if (exp_q.size() == 0) check(0, "read data with no read outstanding");
    else begin
      logic [WORD_W-1:0] e;
      e = exp_q.pop_front();
      check(rd_data == e, $sformatf("read data mismatch (read %0d)", rd_returned));
    end
  end

  task automatic send(input user_op_e op, input logic [UADDR_W-1:0] a,
                      input logic [WORD_W-1:0] d = '0);
    @(negedge ctrl_clk);
    req_valid = 1; req_op = op; req_addr = a; req_wdata = d;
    while (!req_ready) begin
      full_cycles++;
      @(negedge ctrl_clk);
    end
    @(negedge ctrl_clk);
    req_valid = 0;
    if (op == OP_WRITE || op == OP_WRITE_AP) ref_mem[int'(a)] = d;
    if (op == OP_READ || op == OP_READ_AP)
      exp_q.push_back(ref_mem.exists(int'(a)) ? ref_mem[int'(a)] : '0);
  endtask

  task automatic wr(input logic [UADDR_W-1:0] a, input bit ap = 0);
    send(ap ? OP_WRITE_AP : OP_WRITE, a, rnd_word());
  endtask

  task automatic rd(input logic [UADDR_W-1:0] a, input bit ap = 0);
    send(ap ? OP_READ_AP : OP_READ, a);
  endtask

  task automatic cfg_write(input int r, input int v);
    @(negedge ctrl_clk);
    cfg_register_number = 4'(r); cfg_in_value = 8'(v); cfg_load = 1;
    @(negedge ctrl_clk);
    cfg_load = 0;
  endtask

  task automatic cfg_read(input int r, output logic [7:0] v);
    @(negedge ctrl_clk);
    cfg_register_number = 4'(r); cfg_fetch = 1;
    @(negedge ctrl_clk);
    cfg_fetch = 0;
    v = cfg_out_value;
  endtask

  task automatic drain();
    int n = 0;
    while ((exp_q.size() != 0 || dut.head_valid) && n < 5000) begin
      @(negedge ctrl_clk); n++;
    end
    repeat (40) @(negedge ctrl_clk);
    check(exp_q.size() == 0, "all reads returned");
  endtask

  // watchdog
  initial begin
    repeat (400000) @(posedge clk_in);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v;
    int n_ref0, n_act0, t0, t1;
    #0.1 rst_n = 0;                       // a reset edge, before the first clock edge
    repeat (5) @(posedge clk_in);
    rst_n = 1;
    wait (ctrl_rst_n);                    // outputs are valid from here on
    @(posedge ctrl_clk);
    started = 1;

    // ------------------------------------------------- initialization
    wait (init_done);
    check(mem.mr_seen == 4'hF && mem.zq_done, $sformatf("init wrote MR0-MR3 and ZQCL (%b %0d %0d %0d)", mem.mr_seen, mem.zq_done, mem.n_mrs, mem.n_reset));
    check(mem.cl == 6 && mem.cwl == 5 && !mem.bc4, "init mode registers: CL6 CWL5 BL8");
    check(mem.mr[1][2] == 1'b1 && mem.mr[1][6] == 1'b0 && mem.mr[1][9] == 1'b0,
          "MR1 RTT_Nom = RZQ/4");
    check(mem.mr[2][10:9] == 2'b01, "MR2 RTT_WR = RZQ/4 (dynamic ODT)");
    check(mem.mr[0][8] == 1'b1, "MR0 DLL reset during init");

    // -------------------------------------------- configuration interface
    cfg_write(15, 51);
    cfg_read(15, v);
    check(v == 8'd51, "config register 15 reads back 51");
    cfg_read(CFG_CL, v);
    check(v == 8'd6, "config CL register reset value");
    cfg_write(CFG_REFI, REFI16);
    mem.max_ref_gap = REFI16 * 16 + 300;
    mem.odt_check = 1;

    // ---------------------------------------------- basic write/read
    for (int bk = 0; bk < 8; bk++) wr(mk(5, bk, 0));            // empty banks: ACT
    for (int bk = 0; bk < 8; bk++) wr(mk(5, bk, 1));            // row hits
    for (int bk = 0; bk < 8; bk++) rd(mk(5, bk, 0));
    for (int bk = 0; bk < 8; bk++) rd(mk(5, bk, 1));
    drain();
    check(mem.n_act >= 8, "activates for closed banks");

    // -------------------------------------------------------- row misses
    n_act0 = mem.n_act;
    wr(mk(9, 2, 3)); rd(mk(5, 2, 0)); wr(mk(11, 2, 4)); rd(mk(9, 2, 3));
    rd(mk(11, 2, 4));
    drain();
    check(mem.n_pre >= 3, "row misses precharge the bank");

    // ---------------------------------------------------- auto-precharge
    wr(mk(20, 4, 0), 1); rd(mk(20, 4, 0), 1); wr(mk(21, 4, 2), 1); rd(mk(21, 4, 2));
    drain();
    check(mem.n_wra >= 2 && mem.n_rda >= 1, "auto-precharge commands issued");

    // --------------------------------- streaming: full queue, turnarounds
    for (int i = 0; i < 24; i++) wr(mk(30, i % 8, i / 8));
    for (int i = 0; i < 24; i++) begin
      rd(mk(30, i % 8, i / 8));
      if (i % 3 == 0) wr(mk(31, i % 8, 7));
    end
    drain();

    // --------------------------------------- refresh with rows left open
    n_ref0 = mem.n_ref;
    repeat (REFI16 * 16 + 200) @(negedge ctrl_clk);
    check(mem.n_ref > n_ref0, "periodic refresh while idle");
    for (int i = 0; i < 8; i++) rd(mk(30, i, 0));
    drain();

    // ------------------------------- run-time MRS: CL 7, CWL 6, then BC4
    cfg_write(CFG_CL, 7);
    cfg_write(CFG_CWL, 6);
    send(OP_MRS, UADDR_W'(0));
    send(OP_MRS, UADDR_W'(2));
    for (int i = 0; i < 6; i++) wr(mk(40, i, 1));
    for (int i = 0; i < 6; i++) rd(mk(40, i, 1));
    drain();
    check(mem.cl == 7 && mem.cwl == 6, "memory runs with CL7 CWL6 after MRS");
    check(dut.cl == 4'd7 && dut.cwl == 4'd6, "controller follows the new latencies");

    cfg_write(CFG_BL, 2);
    send(OP_MRS, UADDR_W'(0));
    for (int i = 0; i < 4; i++) wr(mk(41, i, 2));
    for (int i = 0; i < 4; i++) rd(mk(41, i, 2));
    drain();
    check(mem.bc4 && dut.bc4, "burst chop 4 switched on through MR0");
    cfg_write(CFG_BL, 0);
    send(OP_MRS, UADDR_W'(0));

    // ------------------------------------------------------ self-refresh
    wr(mk(50, 1, 0));
    send(OP_SELF_REFRESH, '0);
    repeat (100) @(negedge ctrl_clk);
    check(self_refresh && !ddr_cke, "in self-refresh with CKE low");
    n_ref0 = mem.n_ref;
    repeat (REFI16 * 16 * 2) @(negedge ctrl_clk);
    check(mem.n_ref == n_ref0, "no REF commands during self-refresh");
    rd(mk(50, 1, 0));
    drain();
    check(!self_refresh && mem.n_srx >= 1, "self-refresh left on a new request");

    // -------------------------------------------------------- power-down
    send(OP_POWER_DOWN, '0);
    repeat (20) @(negedge ctrl_clk);
    check(power_down && !ddr_cke, "in power-down with CKE low");
    t0 = mem.n_pdx;
    n_ref0 = mem.n_ref;
    repeat (REFI16 * 16 + 100) @(negedge ctrl_clk);
    check(mem.n_pdx > t0 && mem.n_ref > n_ref0, "power-down left for a due refresh");
    t1 = mem.n_pde;
    send(OP_POWER_DOWN, '0);
    repeat (20) @(negedge ctrl_clk);
    rd(mk(30, 3, 0));
    drain();
    check(mem.n_pde > t1 && !power_down, "power-down left on a new request");

    // ------------------------------------------------------ memory reset
    wr(mk(60, 2, 0));
    rd(mk(60, 2, 0));
    send(OP_MEM_RESET, '0);
    wait (!init_done);
    check(exp_q.size() == 0, "reads before the memory reset completed");
    check(!ddr_reset_n || !init_done, "RESET# driven for the memory reset");
    ref_mem.delete();                     // contents are gone after RESET#
    wait (init_done);
    check(mem.n_reset == 1 && mem.mr_seen == 4'hF && mem.zq_done,
          "memory reset, then MR0-MR3 and ZQCL again");
    check(mem.cl == 7 && mem.cwl == 6 && !mem.bc4, "re-initialized from the config registers");

    // -------------------------------------------- random mixed traffic
    for (int i = 0; i < 300; i++) begin
      int unsigned r;
      logic [UADDR_W-1:0] a;
      r = $urandom_range(0, 99);
      a = mk($urandom_range(0, 3), $urandom_range(0, 7), $urandom_range(0, 3));
      if (r < 40)      wr(a, r < 8);
      else if (ref_mem.exists(int'(a))) rd(a, r > 90);
      else             wr(a);
    end
    drain();

    // -------------------------------------------------------- summary
    check(mem.errors == 0, $sformatf("memory model saw %0d protocol errors", mem.errors));
    check(mem.n_rdata == rd_returned, "every read burst returned to the user");
    check(mem.n_wdata == mem.n_wr + mem.n_wra, "every write burst carried data");
    $display("events: ACT %0d PRE %0d PREA %0d REF %0d RD %0d RDA %0d WR %0d WRA %0d MRS %0d",
             mem.n_act, mem.n_pre, mem.n_prea, mem.n_ref, mem.n_rd, mem.n_rda, mem.n_wr,
             mem.n_wra, mem.n_mrs);
    $display("events: SRE %0d SRX %0d PDE %0d PDX %0d queue-full cycles %0d ODT cycles %0d",
             mem.n_sre, mem.n_srx, mem.n_pde, mem.n_pdx, full_cycles, mem.n_odt_cycles);
    check(mem.n_act > 0,  "mechanism: activate");
    check(mem.n_pre > 0,  "mechanism: row-miss precharge");
    check(mem.n_prea > 0, "mechanism: precharge all");
    check(mem.n_ref > 0,  "mechanism: refresh");
    check(mem.n_rd + mem.n_wr > mem.n_act, "mechanism: row hits");
    check(mem.n_rda > 0 && mem.n_wra > 0, "mechanism: auto-precharge");
    check(mem.n_mrs > 4,  "mechanism: MRS in normal operation");
    check(mem.n_sre > 0 && mem.n_srx > 0, "mechanism: self-refresh");
    check(mem.n_pde > 1 && mem.n_pdx > 1, "mechanism: power-down");
    check(full_cycles > 0, "mechanism: command queue full");
    check(mem.n_odt_cycles > 0, "mechanism: ODT");
    check(mem.n_reset > 0, "mechanism: memory reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
