// tb_ddr3_full: the DDR3 controller at its default parameters, through one
// complete operation: the full JEDEC power-up (200 us RESET#, 500 us before
// CKE, 80,000 + 200,000 memory cycles), mode register programming, writes
// and reads over all eight banks with row hits and misses, and periodic
// refresh at the default 7.8 us interval.  The behavioural memory model
// checks the protocol; the bench checks the read data.
`timescale 1ns/1ps
module tb_ddr3_full;
  import ddr3_pkg::*;

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

  ddr3_ctrl_top dut (.*);

  ddr3_mem_model mem (
    .ck(ddr_ck), .reset_n(ddr_reset_n), .cke(ddr_cke), .cs_n(ddr_cs_n),
    .ras_n(ddr_ras_n), .cas_n(ddr_cas_n), .we_n(ddr_we_n), .ba(ddr_ba),
    .addr(ddr_addr), .odt(ddr_odt), .wrdata_en(mem_wrdata_en),
    .wrdata(mem_wrdata), .rddata_valid(mem_rddata_valid), .rddata(mem_rddata)
  );

  always #0.625 clk_in = ~clk_in;   // 800 MHz in, 400 MHz memory clock

  int checks = 0, failures = 0;
  logic [WORD_W-1:0] ref_mem [int unsigned];
  logic [WORD_W-1:0] exp_q [$];

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  bit started = 0;                      // set once the controller is out of reset
  always @(negedge ctrl_clk) if (started && rd_valid && init_done) begin
    if (exp_q.size() == 0) check(0, "read data with no read outstanding");
    else begin
      logic [WORD_W-1:0] e;
      e = exp_q.pop_front();
      check(rd_data == e, "read data");
    end
  end

  task automatic send(input user_op_e op, input logic [UADDR_W-1:0] a);
    logic [WORD_W-1:0] d;
    for (int i = 0; i < WORD_W / 32; i++) d[i*32 +: 32] = $urandom;
    @(negedge ctrl_clk);
    req_valid = 1; req_op = op; req_addr = a; req_wdata = d;
    while (!req_ready) @(negedge ctrl_clk);
    @(negedge ctrl_clk);
    req_valid = 0;
    if (op == OP_WRITE || op == OP_WRITE_AP) ref_mem[int'(a)] = d;
    else exp_q.push_back(ref_mem[int'(a)]);
  endtask

  initial begin
    repeat (1200000) @(posedge clk_in);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_init;
    #0.1 rst_n = 0;                       // a reset edge, before the first clock edge
    repeat (5) @(posedge clk_in);
    rst_n = 1;
    wait (ctrl_rst_n);                    // outputs are valid from here on
    @(posedge ctrl_clk);
    started = 1;
    wait (init_done);
    t_init = mem.cyc;
    // 80,000 + 200,000 + tXPR + 3 x tMRD + tMOD + tZQinit memory cycles
    check(t_init >= longint'(T_RESET + T_CKEON + T_XPR + 3 * T_MRD + T_MOD + T_ZQINIT),
          $sformatf("power-up took %0d cycles", t_init));
    check(mem.cl == 6 && mem.cwl == 5 && mem.mr_seen == 4'hF, "mode registers programmed");
    mem.max_ref_gap = T_REFI + 300;
    mem.odt_check = 1;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < 64; i++)
        send(i % 5 == 0 ? OP_WRITE_AP : OP_WRITE,
             {ROW_W'(pass * 3 + i % 3), BANK_W'(i % 8), CBURST_W'(i / 8)});
      for (int i = 0; i < 64; i++)
        send(i % 7 == 0 ? OP_READ_AP : OP_READ,
             {ROW_W'(pass * 3 + i % 3), BANK_W'(i % 8), CBURST_W'(i / 8)});
      repeat (2000) @(negedge ctrl_clk);
    end
    check(exp_q.size() == 0, "all reads returned");
    check(mem.n_ref >= 1, "periodic refresh at the default interval");
    check(mem.errors == 0, $sformatf("memory model saw %0d protocol errors", mem.errors));
    $display("events: ACT %0d PRE %0d REF %0d RD %0d WR %0d, init done at cycle %0d",
             mem.n_act, mem.n_pre, mem.n_ref, mem.n_rd + mem.n_rda, mem.n_wr + mem.n_wra, t_init);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
