// ddr3_pkg: types, constants and mode-register helpers shared by the DDR3
// controller blocks.
//
// The controller moves one 8n-bit word per burst across its boundary: a DDR3
// device with an n-bit DQ bus transfers eight n-bit beats on both clock edges
// for every access (8n prefetch), so one internal word holds a whole BL8
// burst.  DQ_W = 64 follows the 64-bit module the design targets; the row,
// column and bank widths describe a 2 Gb x8 device organisation (8 banks,
// 16K rows, 1K columns) and are this design's choice.  Timing defaults are
// JEDEC DDR3-800E numbers in memory-clock cycles at 400 MHz (2.5 ns), the top
// of the 300-400 MHz memory clock range the design supports.
package ddr3_pkg;

  // ---------------------------------------------------------------- geometry
  localparam int unsigned BANK_W   = 3;                 // 8 banks per device
  localparam int unsigned NUM_BANKS = 1 << BANK_W;
  localparam int unsigned ROW_W    = 14;
  localparam int unsigned COL_W    = 10;
  localparam int unsigned CBURST_W = COL_W - 3;         // burst-aligned column
  localparam int unsigned ADDR_W   = 14;                // A[13:0] pins
  localparam int unsigned DQ_W     = 64;                // data pins
  localparam int unsigned WORD_W   = 8 * DQ_W;          // one BL8 burst
  localparam int unsigned UADDR_W  = ROW_W + BANK_W + CBURST_W; // user address

  // --------------------------------------------- timing (cycles at 2.5 ns)
  localparam int unsigned T_RCD   = 6;
  localparam int unsigned T_RP    = 6;
  localparam int unsigned T_RAS   = 15;
  localparam int unsigned T_RC    = 21;
  localparam int unsigned T_RRD   = 4;
  localparam int unsigned T_CCD   = 4;
  localparam int unsigned T_WR    = 6;
  localparam int unsigned T_WTR   = 4;
  localparam int unsigned T_RTP   = 4;
  localparam int unsigned T_MRD   = 4;
  localparam int unsigned T_MOD   = 12;
  localparam int unsigned T_RFC   = 64;      // 160 ns, 2 Gb device
  localparam int unsigned T_REFI  = 3120;    // 7.8 us
  localparam int unsigned T_XPR   = 68;      // tRFC + 10 ns
  localparam int unsigned T_XS    = 68;      // tRFC + 10 ns
  localparam int unsigned T_XP    = 3;
  localparam int unsigned T_CKE   = 3;
  localparam int unsigned T_CKESR = 4;
  localparam int unsigned T_ZQINIT = 512;
  localparam int unsigned T_RESET  = 80000;  // 200 us RESET# low
  localparam int unsigned T_CKEON  = 200000; // 500 us from RESET# high to CKE

  // Mode register values are built from these; the write recovery written
  // into MR0 must match T_WR.
  localparam int unsigned ODTH8 = 6;  // ODT high time for a BL8 write
  localparam int unsigned ODTH4 = 4;  // ODT high time for a BC4 write

  // ------------------------------------------------------------- commands
  // Internal command set of the controller.  The address/command decode block
  // turns each into CS#/RAS#/CAS#/WE# and the A10/A12 bits.
  typedef enum logic [3:0] {
    CMD_NOP  = 4'd0,
    CMD_DES  = 4'd1,
    CMD_MRS  = 4'd2,
    CMD_REF  = 4'd3,   // with CKE falling: self-refresh entry
    CMD_PRE  = 4'd4,
    CMD_PREA = 4'd5,
    CMD_ACT  = 4'd6,
    CMD_WR   = 4'd7,
    CMD_WRA  = 4'd8,
    CMD_RD   = 4'd9,
    CMD_RDA  = 4'd10,
    CMD_ZQCL = 4'd11
  } mem_cmd_e;

  // Requests accepted from the user side.
  typedef enum logic [2:0] {
    OP_READ         = 3'd0,
    OP_WRITE        = 3'd1,
    OP_READ_AP      = 3'd2,  // read, then close the row (auto-precharge)
    OP_WRITE_AP     = 3'd3,  // write, then close the row (auto-precharge)
    OP_MRS          = 3'd4,  // reprogram MR0..MR3 from the config registers
    OP_SELF_REFRESH = 3'd5,
    OP_POWER_DOWN   = 3'd6,
    OP_MEM_RESET    = 3'd7   // pulse RESET# and initialize the memory again
  } user_op_e;

  // User request as queued by the command pipeline.
  typedef struct packed {
    user_op_e            op;
    logic [UADDR_W-1:0]  addr;   // {row, bank, burst column}; MRS: addr[1:0] = MR index
    logic [WORD_W-1:0]   wdata;
  } user_req_t;

  // Request after address decode and bank look-up.
  typedef struct packed {
    logic                 is_rd;
    logic                 is_wr;
    logic                 ap;
    logic                 is_mrs;
    logic                 is_sr;
    logic                 is_pd;
    logic                 is_rst;
    logic [BANK_W-1:0]    bank;
    logic [ROW_W-1:0]     row;
    logic [COL_W-1:0]     col;
    logic [1:0]           mr;
    logic                 bank_open;
    logic                 row_hit;
  } dec_req_t;

  // ------------------------------------------------ configuration registers
  localparam int unsigned CFG_NUM_REGS = 16;
  localparam int unsigned CFG_BL      = 0;  // [1:0] MR0 burst length: 0 BL8, 2 BC4
  localparam int unsigned CFG_CL      = 1;  // CAS latency, 5..11
  localparam int unsigned CFG_CWL     = 2;  // CAS write latency, 5..8
  localparam int unsigned CFG_EN      = 3;  // [0] refresh [1] ODT [2] dynamic ODT
  localparam int unsigned CFG_RTT_NOM = 4;  // [2:0] MR1 RTT_Nom code
  localparam int unsigned CFG_RTT_WR  = 5;  // [1:0] MR2 RTT_WR code
  localparam int unsigned CFG_REFI    = 6;  // refresh interval / 16 cycles

  typedef struct packed {
    logic [1:0] bl;
    logic [3:0] cl;
    logic [3:0] cwl;
    logic       ref_en;
    logic       odt_en;
    logic       dyn_odt_en;
    logic [2:0] rtt_nom;
    logic [1:0] rtt_wr;
    logic [7:0] refi16;
  } cfg_t;

  // Power-up contents: BL8, CL 6, CWL 5, refresh + ODT + dynamic ODT on,
  // RTT_Nom = RZQ/4 (60 ohm), RTT_WR = RZQ/4, tREFI = 195 * 16 = 3120.
  localparam logic [CFG_NUM_REGS*8-1:0] CFG_RESET =
    {72'h0, 8'd195, 8'h01, 8'h01, 8'h07, 8'd5, 8'd6, 8'h00};

  function automatic cfg_t cfg_decode(input logic [CFG_NUM_REGS*8-1:0] regs);
    cfg_t c;
    c.bl         = regs[CFG_BL*8 +: 2];
    c.cl         = regs[CFG_CL*8 +: 4];
    c.cwl        = regs[CFG_CWL*8 +: 4];
    c.ref_en     = regs[CFG_EN*8 + 0];
    c.odt_en     = regs[CFG_EN*8 + 1];
    c.dyn_odt_en = regs[CFG_EN*8 + 2];
    c.rtt_nom    = regs[CFG_RTT_NOM*8 +: 3];
    c.rtt_wr     = regs[CFG_RTT_WR*8 +: 2];
    c.refi16     = regs[CFG_REFI*8 +: 8];
    return c;
  endfunction

  // MR0 write-recovery field for a tWR in cycles (JEDEC table).
  function automatic logic [2:0] wr_code(input int unsigned wr);
    case (wr)
      5: return 3'b001;  6: return 3'b010;  7: return 3'b011;
      8: return 3'b100; 10: return 3'b101; 12: return 3'b110;
      default: return 3'b000;  // 16
    endcase
  endfunction

  // MR0: burst length, CAS latency (CL 5..11 coded as CL-4 in A6:A4, A2 = 0),
  // DLL reset, write recovery.
  function automatic logic [ADDR_W-1:0] mr0_value(input cfg_t c, input logic dll_reset);
    logic [ADDR_W-1:0] v;
    logic [3:0] clm4;
    v = '0;
    clm4 = c.cl - 4'd4;
    v[1:0]  = c.bl;
    v[6:4]  = clm4[2:0];
    v[8]    = dll_reset;
    v[11:9] = wr_code(T_WR);
    v[12]   = 1'b1;              // fast exit precharge power-down
    return v;
  endfunction

  // MR1: DLL enabled, RZQ/7 drive, RTT_Nom on A9/A6/A2 when ODT is enabled.
  function automatic logic [ADDR_W-1:0] mr1_value(input cfg_t c);
    logic [ADDR_W-1:0] v;
    logic [2:0] rtt;
    v = '0;
    rtt  = c.odt_en ? c.rtt_nom : 3'b000;
    v[1] = 1'b0;
    v[2] = rtt[0];
    v[6] = rtt[1];
    v[9] = rtt[2];
    return v;
  endfunction

  // MR2: CWL 5..8 coded as CWL-5 in A5:A3, RTT_WR on A10:A9 when dynamic ODT
  // is enabled.
  function automatic logic [ADDR_W-1:0] mr2_value(input cfg_t c);
    logic [ADDR_W-1:0] v;
    logic [3:0] cwlm5;
    v = '0;
    cwlm5 = c.cwl - 4'd5;
    v[5:3]  = cwlm5[2:0];
    v[10:9] = (c.odt_en && c.dyn_odt_en) ? c.rtt_wr : 2'b00;
    return v;
  endfunction

  function automatic logic [ADDR_W-1:0] mr_value(input cfg_t c, input logic [1:0] mr);
    case (mr)
      2'd0:    return mr0_value(c, 1'b0);
      2'd1:    return mr1_value(c);
      2'd2:    return mr2_value(c);
      default: return '0;       // MR3: normal operation, no MPR
    endcase
  endfunction

endpackage
