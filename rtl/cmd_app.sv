// cmd_app: command application logic, the controller's main state machine.
//
// One DDR3 command per memory clock.  Until init_done it forwards the
// commands of the initialization state machine.  Afterwards it works on the
// decoded request at the head of the command queue, using the bank
// management state to issue only the commands that request needs:
//   read/write to the open row      RD/WR (RDA/WRA for auto-precharge) and
//                                   pop the request
//   read/write, other row open      PRE of that bank
//   read/write, bank closed         ACT of the row
//   mode register write             PREA if rows are open, then MRS with the
//                                   value built from the config registers
//   self-refresh / power-down       PREA if needed, then CKE low (with REF
//                                   for self-refresh); CKE returns high when
//                                   the next request arrives, and for a
//                                   refresh that falls due in power-down
//   memory reset                    PREA if needed, then init_restart: the
//                                   initialization state machine drives
//                                   RESET# low and runs again, and its
//                                   commands are forwarded until init_done
// A refresh timer (interval = config register CFG_REFI x 16 cycles) raises a
// refresh request, served ahead of user requests: PREA if needed, then REF.
// Column commands respect tCCD, write-to-read (CWL+4+tWTR) and read-to-write
// (CL+tCCD+2-CWL) spacing; activates respect tRRD; REF, MRS and the
// low-power exits block all commands for tRFC, tMOD, tXS and tXP.
// Low-power entry waits until read data and write recovery are complete.
// The CAS latency, CAS write latency and burst length in force are taken
// from the MR0/MR2 values the controller itself writes, so the data path
// and ODT always match the memory's mode registers.
// Outputs cmd/ba/addr/cke are valid in the cycle of issue and are registered
// by the address/command decode block.  The functions (initialization,
// refresh, open-row bank policy, auto-precharge, MRS in normal operation,
// self-refresh, power-down and the memory reset) follow the design; how and when each is
// scheduled, and the four-bank activate window (tFAW) being left out, are
// this design's choices.  At DDR3-800 with 1 KB pages tFAW (40 ns, 16
// cycles) equals four tRRD, so tRRD spacing alone already meets it.
module cmd_app
  import ddr3_pkg::*;
#(
  parameter int unsigned P_RRD   = T_RRD,
  parameter int unsigned P_CCD   = T_CCD,
  parameter int unsigned P_WTR   = T_WTR,
  parameter int unsigned P_WR    = T_WR,
  parameter int unsigned P_RFC   = T_RFC,
  parameter int unsigned P_MOD   = T_MOD,
  parameter int unsigned P_XS    = T_XS,
  parameter int unsigned P_XP    = T_XP,
  parameter int unsigned P_CKE   = T_CKE,
  parameter int unsigned P_CKESR = T_CKESR
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // initialization state machine
  input  logic                  init_done,
  input  mem_cmd_e              init_cmd,
  input  logic [BANK_W-1:0]     init_ba,
  input  logic [ADDR_W-1:0]     init_addr,
  input  logic                  init_cke,
  output logic                  init_restart,
  // configuration
  input  cfg_t                  cfg,
  // decoded head of the command queue
  input  logic                  dec_valid,
  input  dec_req_t              dec,
  output logic                  pop,
  // bank management
  input  logic [NUM_BANKS-1:0]  bank_open,
  input  logic [NUM_BANKS-1:0]  can_act,
  input  logic [NUM_BANKS-1:0]  can_rw,
  input  logic [NUM_BANKS-1:0]  can_pre,
  // command out (cycle of issue)
  output mem_cmd_e              cmd,
  output logic [BANK_W-1:0]     ba,
  output logic [ADDR_W-1:0]     addr,
  output logic                  cke,
  output logic                  wr_issue,
  output logic                  rd_issue,
  // mode register settings in force
  output logic [3:0]            cl,
  output logic [3:0]            cwl,
  output logic                  bc4,
  // status
  output logic                  in_self_refresh,
  output logic                  in_power_down,
  output logic                  refresh_pending
);

  typedef enum logic [1:0] {S_INIT, S_RUN, S_SR, S_PD} state_e;

  state_e      state_q;
  logic [7:0]  busy_q;        // all commands blocked
  logic [3:0]  lpmin_q;       // minimum time in a low-power state
  logic [3:0]  ccd_q, rrd_q;
  logic [4:0]  wtr_q, rtw_q;
  logic [4:0]  dq_q;          // read data / write recovery still in flight
  logic [11:0] refi_q;
  logic        ref_pend_q;
  logic [3:0]  cl_q, cwl_q;
  logic [1:0]  bl_q;

  // decisions of this cycle
  state_e      state_d;
  logic [7:0]  busy_set;
  logic        ref_clr, refi_reload, lp_enter;
  logic [3:0]  lp_min;

  logic any_open, all_pre_ok, all_act_ok, bank_rw_ok, bank_pre_ok, bank_act_ok;

  assign any_open    = |bank_open;
  assign all_pre_ok  = &(can_pre | ~bank_open);
  assign all_act_ok  = &can_act;
  assign bank_rw_ok  = can_rw[dec.bank];
  assign bank_pre_ok = can_pre[dec.bank];
  assign bank_act_ok = can_act[dec.bank];

  always_comb begin
    cmd         = CMD_NOP;
    ba          = '0;
    addr        = '0;
    cke         = (state_q != S_SR) && (state_q != S_PD);
    pop         = 1'b0;
    init_restart = 1'b0;
    state_d     = state_q;
    busy_set    = '0;
    ref_clr     = 1'b0;
    refi_reload = 1'b0;
    lp_enter    = 1'b0;
    lp_min      = '0;

    unique case (state_q)
      S_INIT: begin
        cmd  = init_cmd;
        ba   = init_ba;
        addr = init_addr;
        cke  = init_cke;
        if (init_done) begin
          state_d     = S_RUN;
          refi_reload = 1'b1;
        end
      end

      S_RUN: if (busy_q == '0) begin
        if (ref_pend_q) begin
          if (any_open) begin
            if (all_pre_ok) cmd = CMD_PREA;
          end else if (all_act_ok) begin
            cmd      = CMD_REF;
            ref_clr  = 1'b1;
            busy_set = 8'(P_RFC - 1);
          end
        end else if (dec_valid && (dec.is_rd || dec.is_wr)) begin
          ba = dec.bank;
          if (dec.row_hit) begin
            if (bank_rw_ok && ccd_q == '0 &&
                (dec.is_rd ? (wtr_q == '0) : (rtw_q == '0))) begin
              cmd  = dec.is_rd ? (dec.ap ? CMD_RDA : CMD_RD)
                               : (dec.ap ? CMD_WRA : CMD_WR);
              addr = ADDR_W'(dec.col);
              pop  = 1'b1;
            end
          end else if (dec.bank_open) begin
            if (bank_pre_ok) cmd = CMD_PRE;
          end else if (bank_act_ok && rrd_q == '0) begin
            cmd  = CMD_ACT;
            addr = ADDR_W'(dec.row);
          end
        end else if (dec_valid) begin
          // MRS, self-refresh, power-down and memory reset need every bank closed
          if (any_open) begin
            if (all_pre_ok) cmd = CMD_PREA;
          end else if (all_act_ok) begin
            if (dec.is_mrs) begin
              cmd      = CMD_MRS;
              ba       = BANK_W'(dec.mr);
              addr     = mr_value(cfg, dec.mr);
              pop      = 1'b1;
              busy_set = 8'(P_MOD - 1);
            end else if (dq_q == '0 && dec.is_rst) begin
              pop          = 1'b1;
              init_restart = 1'b1;
              state_d      = S_INIT;
            end else if (dq_q == '0) begin
              pop      = 1'b1;
              cke      = 1'b0;
              lp_enter = 1'b1;
              if (dec.is_sr) begin
                cmd     = CMD_REF;          // REF with CKE low: SRE
                ref_clr = 1'b1;
                state_d = S_SR;
                lp_min  = 4'(P_CKESR - 1);
              end else begin
                state_d = S_PD;
                lp_min  = 4'(P_CKE - 1);
              end
            end
          end
        end
      end

      S_SR: if (lpmin_q == '0 && dec_valid) begin
        cke         = 1'b1;                 // SRX
        state_d     = S_RUN;
        busy_set    = 8'(P_XS - 1);
        refi_reload = 1'b1;
      end

      S_PD: if (lpmin_q == '0 && (dec_valid || ref_pend_q)) begin
        cke      = 1'b1;                    // PDX
        state_d  = S_RUN;
        busy_set = 8'(P_XP - 1);
      end

      default: ;
    endcase
  end

  function automatic logic [4:0] max5(input logic [4:0] a, input logic [4:0] b);
    return (a > b) ? a : b;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_INIT;
      busy_q     <= '0;
      lpmin_q    <= '0;
      ccd_q      <= '0;
      rrd_q      <= '0;
      wtr_q      <= '0;
      rtw_q      <= '0;
      dq_q       <= '0;
      refi_q     <= '0;
      ref_pend_q <= 1'b0;
      cl_q       <= 4'd6;
      cwl_q      <= 4'd5;
      bl_q       <= 2'b00;
    end else begin
      state_q <= state_d;
      busy_q  <= (busy_set != '0) ? busy_set : ((busy_q != '0) ? busy_q - 8'd1 : '0);
      lpmin_q <= lp_enter ? lp_min : ((lpmin_q != '0) ? lpmin_q - 4'd1 : '0);
      ccd_q   <= (ccd_q != '0) ? ccd_q - 4'd1 : '0;
      rrd_q   <= (rrd_q != '0) ? rrd_q - 4'd1 : '0;
      wtr_q   <= (wtr_q != '0) ? wtr_q - 5'd1 : '0;
      rtw_q   <= (rtw_q != '0) ? rtw_q - 5'd1 : '0;
      dq_q    <= (dq_q  != '0) ? dq_q  - 5'd1 : '0;

      unique case (cmd)
        CMD_ACT: rrd_q <= 4'(P_RRD - 1);
        CMD_RD, CMD_RDA: begin
          ccd_q <= 4'(P_CCD - 1);
          rtw_q <= 5'(cl_q) + 5'(P_CCD + 2 - 1) - 5'(cwl_q);
          dq_q  <= max5(dq_q, 5'(cl_q) + 5'd4);            // RL + 4 + 1
        end
        CMD_WR, CMD_WRA: begin
          ccd_q <= 4'(P_CCD - 1);
          wtr_q <= 5'(cwl_q) + 5'(4 + P_WTR - 1);
          dq_q  <= max5(dq_q, 5'(cwl_q) + 5'(4 + P_WR - 1)); // WL + 4 + tWR
        end
        CMD_MRS: begin
          if (ba == 3'd0) begin
            cl_q <= {1'b0, addr[6:4]} + 4'd4;
            bl_q <= addr[1:0];
          end
          if (ba == 3'd2) cwl_q <= {1'b0, addr[5:3]} + 4'd5;
        end
        default: ;
      endcase

      // refresh interval timer; the memory refreshes itself in self-refresh
      // a shorter interval written to the config registers applies at once
      if (refi_reload || state_q == S_INIT || state_q == S_SR ||
          !cfg.ref_en || refi_q == '0 || refi_q > {cfg.refi16, 4'h0} - 12'd1)
        refi_q <= {cfg.refi16, 4'h0} - 12'd1;
      else
        refi_q <= refi_q - 12'd1;

      if (ref_clr || !cfg.ref_en || state_q == S_INIT)
        ref_pend_q <= 1'b0;
      else if (refi_q == '0 && state_q != S_SR && !refi_reload)
        ref_pend_q <= 1'b1;
    end
  end

  assign wr_issue        = (cmd == CMD_WR) || (cmd == CMD_WRA);
  assign rd_issue        = (cmd == CMD_RD) || (cmd == CMD_RDA);
  assign cl              = cl_q;
  assign cwl             = cwl_q;
  assign bc4             = (bl_q == 2'b10);
  assign in_self_refresh = (state_q == S_SR);
  assign in_power_down   = (state_q == S_PD);
  assign refresh_pending = ref_pend_q;

  // A column command only goes to an open bank that is past tRCD.
  a_rw_open: assert property (@(posedge clk) disable iff (!rst_n)
    (wr_issue || rd_issue) |-> can_rw[ba]);
  a_act_closed: assert property (@(posedge clk) disable iff (!rst_n)
    (cmd == CMD_ACT) |-> can_act[ba]);

endmodule
