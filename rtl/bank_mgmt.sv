// bank_mgmt: bank management logic.
//
// Keeps, for each of the NUM_BANKS banks, whether a row is open and which,
// and three down-counters that say when the bank may next take an activate,
// a read/write, or a precharge.  It watches every command the controller
// issues (cmd/ba/addr in the cycle of issue) and updates:
//   ACT       opens addr as the bank's row; read/write after tRCD, precharge
//             after tRAS, next activate after tRC
//   RD        precharge no earlier than tRTP after it
//   WR        precharge no earlier than write recovery, CWL + 4 + tWR
//   RDA/WRA   as RD/WR, and the row closes by itself: the bank is marked
//             closed at once and may be activated after the precharge
//             point plus tRP (auto-precharge)
//   PRE/PREA  closes one/all banks; next activate after tRP
//   REF       next activate after tRFC
// A counter value k means "k more cycles"; the can_* outputs are high when
// the command is allowed in the current cycle.  Rows stay open after an
// access unless auto-precharge, a precharge for a row miss, a refresh, a mode
// register write or a low-power entry closes them (open-page policy).  The
// tracking of every bank and the open-row policy follow the design; the
// counter scheme is this design's own.
module bank_mgmt
  import ddr3_pkg::*;
#(
  parameter int unsigned CNT_W  = 8,
  parameter int unsigned P_RCD  = T_RCD,
  parameter int unsigned P_RP   = T_RP,
  parameter int unsigned P_RAS  = T_RAS,
  parameter int unsigned P_RC   = T_RC,
  parameter int unsigned P_WR   = T_WR,
  parameter int unsigned P_RTP  = T_RTP,
  parameter int unsigned P_RFC  = T_RFC
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  mem_cmd_e                       cmd,
  input  logic [BANK_W-1:0]              ba,
  input  logic [ADDR_W-1:0]              addr,
  input  logic [3:0]                     cwl,
  output logic [NUM_BANKS-1:0]           bank_open,
  output logic [NUM_BANKS-1:0][ROW_W-1:0] bank_row,
  output logic [NUM_BANKS-1:0]           can_act,
  output logic [NUM_BANKS-1:0]           can_rw,
  output logic [NUM_BANKS-1:0]           can_pre
);

  logic [NUM_BANKS-1:0][CNT_W-1:0] act_q, rw_q, pre_q;
  logic [CNT_W-1:0] wr_rec;

  assign wr_rec = CNT_W'(cwl) + CNT_W'(4 + P_WR - 1);

  function automatic logic [CNT_W-1:0] max2(input logic [CNT_W-1:0] a, input logic [CNT_W-1:0] b);
    return (a > b) ? a : b;
  endfunction

  function automatic logic [CNT_W-1:0] dec(input logic [CNT_W-1:0] a);
    return (a != '0) ? a - CNT_W'(1) : '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_open <= '0;
      bank_row  <= '0;
      act_q     <= '0;
      rw_q      <= '0;
      pre_q     <= '0;
    end else begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        logic sel;
        logic [CNT_W-1:0] pre_pt;
        sel = (BANK_W'(b) == ba);
        act_q[b] <= dec(act_q[b]);
        rw_q[b]  <= dec(rw_q[b]);
        pre_q[b] <= dec(pre_q[b]);
        unique case (cmd)
          CMD_ACT: if (sel) begin
            bank_open[b] <= 1'b1;
            bank_row[b]  <= addr[ROW_W-1:0];
            rw_q[b]      <= CNT_W'(P_RCD - 1);
            pre_q[b]     <= CNT_W'(P_RAS - 1);
            act_q[b]     <= CNT_W'(P_RC - 1);
          end
          CMD_RD: if (sel) pre_q[b] <= max2(pre_q[b], CNT_W'(P_RTP - 1));
          CMD_WR: if (sel) pre_q[b] <= max2(pre_q[b], wr_rec);
          CMD_RDA, CMD_WRA: if (sel) begin
            pre_pt       = max2(pre_q[b], (cmd == CMD_RDA) ? CNT_W'(P_RTP - 1) : wr_rec);
            bank_open[b] <= 1'b0;
            act_q[b]     <= max2(act_q[b], pre_pt + CNT_W'(P_RP));
          end
          CMD_PRE: if (sel) begin
            bank_open[b] <= 1'b0;
            act_q[b]     <= max2(act_q[b], CNT_W'(P_RP - 1));
          end
          CMD_PREA: begin
            bank_open[b] <= 1'b0;
            act_q[b]     <= max2(act_q[b], CNT_W'(P_RP - 1));
          end
          CMD_REF:
            act_q[b]     <= max2(act_q[b], CNT_W'(P_RFC - 1));
          default: ;
        endcase
      end
    end
  end

  always_comb
    for (int b = 0; b < NUM_BANKS; b++) begin
      can_act[b] = !bank_open[b] && (act_q[b] == '0);
      can_rw[b]  =  bank_open[b] && (rw_q[b]  == '0);
      can_pre[b] =  bank_open[b] && (pre_q[b] == '0);
    end

endmodule
