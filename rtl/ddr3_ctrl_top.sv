// ddr3_ctrl_top: DDR3 SDRAM controller.
//
// Connects the blocks of the controller:
//   clock_sync        divides clk_in by 2 * sync_factor into the memory clock,
//                     which also clocks everything below, and synchronizes
//                     reset to it
//   config_interface  16 x 8-bit registers (load/fetch port) holding the
//                     burst length, latencies, ODT settings, refresh interval
//                     and feature enables
//   cmd_pipeline      three-entry queue of user requests
//   cmd_decode        address split and bank look-up of the queue head
//   bank_mgmt         open rows and per-bank timing
//   init_fsm          power-up sequence and mode register programming, run
//                     again on a memory reset request
//   cmd_app           command scheduling, refresh, low-power states, MRS
//   addr_cmd_decode   command to CS#/RAS#/CAS#/WE#/BA/A pins
//   odt_ctrl          ODT pin around writes
//   ddr3_data_path    write-data and read-data alignment
// User side (on ctrl_clk): a request {op, addr, wdata} is taken when
// req_valid and req_ready are high; read data return in order on
// rd_valid/rd_data.  Memory side: the DDR3 command pins, and the data of
// one whole BL8 burst per transfer on mem_wrdata/mem_rddata, for double
// data rate I/O cells outside this RTL.  P_RESET and P_CKEON are the two
// power-up waits in memory-clock cycles (200 us and 500 us at 400 MHz).
module ddr3_ctrl_top
  import ddr3_pkg::*;
#(
  parameter int unsigned P_RESET = T_RESET,
  parameter int unsigned P_CKEON = T_CKEON
) (
  input  logic               clk_in,
  input  logic               rst_n,
  input  logic [7:0]         sync_factor,
  output logic               ctrl_clk,
  output logic               ctrl_rst_n,
  // configuration interface
  input  logic [3:0]         cfg_register_number,
  input  logic [7:0]         cfg_in_value,
  input  logic               cfg_load,
  input  logic               cfg_fetch,
  output logic [7:0]         cfg_out_value,
  // user interface
  input  logic               req_valid,
  output logic               req_ready,
  input  user_op_e           req_op,
  input  logic [UADDR_W-1:0] req_addr,
  input  logic [WORD_W-1:0]  req_wdata,
  output logic               rd_valid,
  output logic [WORD_W-1:0]  rd_data,
  // status
  output logic               init_done,
  output logic               self_refresh,
  output logic               power_down,
  // DDR3 memory
  output logic               ddr_ck,
  output logic               ddr_reset_n,
  output logic               ddr_cke,
  output logic               ddr_cs_n,
  output logic               ddr_ras_n,
  output logic               ddr_cas_n,
  output logic               ddr_we_n,
  output logic [BANK_W-1:0]  ddr_ba,
  output logic [ADDR_W-1:0]  ddr_addr,
  output logic               ddr_odt,
  output logic               mem_wrdata_en,
  output logic [WORD_W-1:0]  mem_wrdata,
  input  logic               mem_rddata_valid,
  input  logic [WORD_W-1:0]  mem_rddata
);

  logic clk, rst_sync_n;

  clock_sync u_csm (
    .clk_in, .rst_n, .sync_factor,
    .out_clk(clk), .rst_n_out(rst_sync_n)
  );

  assign ctrl_clk   = clk;
  assign ctrl_rst_n = rst_sync_n;
  assign ddr_ck     = clk;

  // ---------------------------------------------------------- configuration
  logic [CFG_NUM_REGS*8-1:0] cfg_regs;
  cfg_t                      cfg;

  config_interface #(.NUM_REGS(CFG_NUM_REGS), .NUM_W(4), .RESET_VALUES(CFG_RESET)) u_cfg (
    .clk, .rst_n(rst_sync_n),
    .register_number(cfg_register_number), .in_value(cfg_in_value),
    .load(cfg_load), .fetch(cfg_fetch), .out_value(cfg_out_value),
    .regs_flat(cfg_regs)
  );

  assign cfg = cfg_decode(cfg_regs);

  // ------------------------------------------------------------ user queue
  user_req_t in_req, head;
  logic      head_valid, pop;

  assign in_req = '{op: req_op, addr: req_addr, wdata: req_wdata};

  cmd_pipeline #(.WIDTH($bits(user_req_t)), .DEPTH(3)) u_pipe (
    .clk, .rst_n(rst_sync_n),
    .in_valid(req_valid), .in_ready(req_ready), .in_data(in_req),
    .out_valid(head_valid), .out_ready(pop), .out_data(head), .count()
  );

  // ------------------------------------------------------ decode and banks
  logic [NUM_BANKS-1:0]            bank_open, can_act, can_rw, can_pre;
  logic [NUM_BANKS-1:0][ROW_W-1:0] bank_row;
  logic                            dec_valid;
  dec_req_t                        dec;

  cmd_decode u_dec (
    .req_valid(head_valid), .req(head), .bank_open, .bank_row,
    .dec_valid, .dec
  );

  mem_cmd_e          cmd;
  logic [BANK_W-1:0] ba;
  logic [ADDR_W-1:0] addr;
  logic              cke, wr_issue, rd_issue, bc4;
  logic [3:0]        cl, cwl;

  bank_mgmt u_banks (
    .clk, .rst_n(rst_sync_n), .cmd, .ba, .addr, .cwl,
    .bank_open, .bank_row, .can_act, .can_rw, .can_pre
  );

  // ------------------------------------------------------- command control
  mem_cmd_e          init_cmd;
  logic [BANK_W-1:0] init_ba;
  logic [ADDR_W-1:0] init_addr;
  logic              init_cke, init_reset_n, init_restart;

  init_fsm #(.P_RESET(P_RESET), .P_CKEON(P_CKEON)) u_init (
    .clk, .rst_n(rst_sync_n), .cfg, .restart(init_restart),
    .cmd(init_cmd), .ba(init_ba), .addr(init_addr), .cke(init_cke),
    .reset_n(init_reset_n), .done(init_done)
  );

  cmd_app u_app (
    .clk, .rst_n(rst_sync_n),
    .init_done, .init_cmd, .init_ba, .init_addr, .init_cke, .init_restart,
    .cfg, .dec_valid, .dec, .pop,
    .bank_open, .can_act, .can_rw, .can_pre,
    .cmd, .ba, .addr, .cke, .wr_issue, .rd_issue,
    .cl, .cwl, .bc4,
    .in_self_refresh(self_refresh), .in_power_down(power_down),
    .refresh_pending()
  );

  addr_cmd_decode u_acd (
    .clk, .rst_n(rst_sync_n), .cmd, .ba, .addr, .cke,
    .ddr_cke, .ddr_cs_n, .ddr_ras_n, .ddr_cas_n, .ddr_we_n, .ddr_ba, .ddr_addr
  );

  always_ff @(posedge clk or negedge rst_sync_n)
    if (!rst_sync_n) ddr_reset_n <= 1'b0;
    else             ddr_reset_n <= init_reset_n;

  odt_ctrl u_odt (
    .clk, .rst_n(rst_sync_n),
    .enable(cfg.odt_en && (cfg.rtt_nom != '0 || (cfg.dyn_odt_en && cfg.rtt_wr != '0))),
    .wr_issue, .cwl, .bc4, .odt(ddr_odt)
  );

  // ------------------------------------------------------------- data path
  ddr3_data_path u_data (
    .clk, .rst_n(rst_sync_n), .cwl,
    .wr_issue, .wdata(head.wdata),
    .mem_wrdata_en, .mem_wrdata,
    .mem_rddata_valid, .mem_rddata,
    .rd_valid, .rd_data
  );

endmodule
