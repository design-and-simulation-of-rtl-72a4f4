// ddr3_mem_model: behavioural model of one DDR3 SDRAM rank, for testbenches.
//
// Not synthesizable.  It samples the command pins on every rising edge of
// ck, keeps the state of each bank, stores written bursts in an associative
// array and returns them CL cycles after a read.  Data cross its port one
// whole burst at a time, matching the controller's memory-side data port.
// It checks the controller against the JEDEC rules it models and counts
// every violation in `errors` (with a message):
//   power-up: RESET# low >= P_RESET, CKE low >= P_CKEON after RESET# high,
//             tXPR before the first command, MR0-MR3 and ZQCL before ACT;
//             RESET# low again later clears the device (state and stored
//             data) and demands the whole sequence again
//   per bank: ACT only to a closed bank after tRP / tRC / tRFC, RD/WR only to
//             an open bank after tRCD, PRE after tRAS, tRTP, write recovery
//   bus:      tRRD, tCCD, tWTR, read-to-write, tMRD/tMOD, tRFC, tXS, tXP,
//             tCKE/tCKESR, no command while CKE is low
//   data:     write data exactly CWL cycles after the write command
//   ODT:      if odt_check is set, ODT high exactly from CWL-2 after each
//             write for 6 (BL8) or 4 (BC4) cycles, low otherwise
//   refresh:  if max_ref_gap is non-zero, no more than max_ref_gap cycles
//             between refreshes outside self-refresh
// Counters of each command and event are public for the testbench.
module ddr3_mem_model
  import ddr3_pkg::*;
#(
  parameter int unsigned P_RESET = T_RESET,
  parameter int unsigned P_CKEON = T_CKEON
) (
  input  logic              ck,
  input  logic              reset_n,
  input  logic              cke,
  input  logic              cs_n,
  input  logic              ras_n,
  input  logic              cas_n,
  input  logic              we_n,
  input  logic [BANK_W-1:0] ba,
  input  logic [ADDR_W-1:0] addr,
  input  logic              odt,
  input  logic              wrdata_en,
  input  logic [WORD_W-1:0] wrdata,
  output logic              rddata_valid,
  output logic [WORD_W-1:0] rddata
);

  typedef struct { longint due; int unsigned key; } xfer_t;

  longint cyc = 0;
  int errors = 0;
  bit odt_check = 1'b0;
  bit trace = 0;
  longint max_ref_gap = 0;

  // event counters
  int n_act, n_pre, n_prea, n_ref, n_rd, n_wr, n_rda, n_wra, n_mrs, n_zq;
  int n_sre, n_srx, n_pde, n_pdx, n_odt_cycles, n_wdata, n_rdata, n_reset;

  logic [ADDR_W-1:0] mr [4];
  int cl = 6, cwl = 5;
  bit bc4 = 0;
  bit [3:0] mr_seen = '0;
  bit zq_done = 0, in_sr = 0, in_pd = 0, powered = 0, cke_q = 0, reset_q = 1, seen_reset = 0;

  bit                is_open [NUM_BANKS];
  logic [ROW_W-1:0]  open_row [NUM_BANKS];
  longint t_act [NUM_BANKS], t_act_ok [NUM_BANKS], t_pre_ok [NUM_BANKS];
  longint t_block = 0, t_mod = 0, t_last_mrs = -100, t_last_act = -100;
  longint t_last_col = -100, t_last_wr = -1000, t_last_rd = -1000;
  longint t_reset_fall = 0, t_reset_rise = 0, t_cke_change = 0, t_last_ref = 0;

  logic [WORD_W-1:0] store [int unsigned];
  xfer_t wq[$], rq[$];
  bit odt_need [longint];

  initial begin
    for (int b = 0; b < NUM_BANKS; b++) begin
      is_open[b] = 0; t_act[b] = -100; t_act_ok[b] = 0; t_pre_ok[b] = 0;
    end
    rddata_valid = 1'b0;
    rddata = '0;
    {n_act, n_pre, n_prea, n_ref, n_rd, n_wr, n_rda, n_wra, n_mrs, n_zq} = '0;
    {n_sre, n_srx, n_pde, n_pdx, n_odt_cycles, n_wdata, n_rdata, n_reset} = '0;
  end

  function automatic void err(input string msg);
    errors++;
    $display("DDR3 MODEL ERROR @%0d: %s", cyc, msg);
  endfunction

  function automatic logic [WORD_W-1:0] fill(input int unsigned key);
    logic [WORD_W-1:0] v;
    for (int i = 0; i < WORD_W / 32; i++) v[i*32 +: 32] = key ^ (32'h9e3779b9 * (i + 1));
    return v;
  endfunction

  function automatic longint maxl(input longint a, input longint b);
    return (a > b) ? a : b;
  endfunction

  function automatic bit all_closed();
    for (int b = 0; b < NUM_BANKS; b++) if (is_open[b]) return 0;
    return 1;
  endfunction

  function automatic void close_bank(input int b);
    if (cyc - t_act[b] < T_RAS) err($sformatf("PRE bank %0d before tRAS", b));
    if (cyc < t_pre_ok[b])      err($sformatf("PRE bank %0d before tRTP/tWR", b));
    is_open[b]  = 0;
    t_act_ok[b] = maxl(t_act_ok[b], cyc + T_RP);
  endfunction

  // an edge at time zero only reflects the random start-up values
  always @(posedge ck) if ($realtime > 0) begin
    cyc++;
    step();
  end

  task automatic step();
    logic [3:0] pins;
    int b;
    pins = {cs_n, ras_n, cas_n, we_n};
    b = int'(ba);

    // nothing counts until RESET# and CKE have been driven low together
    // once: before the controller's first clock edge its pins still hold
    // their random start-up values
    if (!reset_n && !cke) seen_reset = 1;
    if (!seen_reset) return;

    // ---------------------------------------------------- reset and CKE
    if (!reset_n && reset_q) t_reset_fall = cyc;
    if (reset_n && !reset_q) begin
      t_reset_rise = cyc;
      if (cyc - t_reset_fall < P_RESET) err("RESET# low too short");
    end
    if (!reset_n && cke) err("CKE high during reset");
    reset_q = reset_n;

    // RESET# low: the device forgets its state and contents and must be
    // initialized again; it takes no commands meanwhile
    if (!reset_n) begin
      if (powered) begin
        n_reset++;
        if (wq.size() != 0 || rq.size() != 0) err("RESET# with data transfers in flight");
        powered = 0; in_sr = 0; in_pd = 0; zq_done = 0; mr_seen = '0;
        for (int k = 0; k < NUM_BANKS; k++) is_open[k] = 0;
        store.delete();
      end
      cke_q = cke;
      rddata_valid <= 1'b0;
      return;
    end

    if (cke && !cke_q) begin                          // CKE rising
      if (!powered) begin
        if (cyc - t_reset_rise < P_CKEON) err("CKE raised too early after RESET#");
        powered = 1;
        t_block = cyc + T_XPR;
      end else if (in_sr) begin
        if (cyc - t_cke_change < T_CKESR) err("self-refresh shorter than tCKESR");
        in_sr = 0; n_srx++;
        t_block = maxl(t_block, cyc + T_XS);
        t_last_ref = cyc;
      end else if (in_pd) begin
        if (cyc - t_cke_change < T_CKE) err("power-down shorter than tCKE");
        in_pd = 0; n_pdx++;
        t_block = maxl(t_block, cyc + T_XP);
      end
      t_cke_change = cyc;
    end else if (!cke && cke_q) begin                 // CKE falling
      if (cyc < t_block) err("low-power entry while blocked");
      if (!all_closed()) err("low-power entry with open banks");
      if (pins == 4'b0001) begin in_sr = 1; n_sre++; end
      else if (pins[3] || pins == 4'b0111) begin in_pd = 1; n_pde++; end
      else err("illegal command with CKE falling");
      t_cke_change = cyc;
    end else if (!cke && !cke_q) begin
      if (!(pins[3] || pins == 4'b0111)) err("command while CKE low");
    end else if (cke && cke_q && !cs_n && pins != 4'b0111) begin
      // ------------------------------------------------------- commands
      if (cyc < t_block) err($sformatf("command %b before tXPR/tRFC/tXS/tXP/tZQinit", pins));
      if (pins != 4'b0000 && cyc < t_mod) err("command before tMOD");
      unique case (pins)
        4'b0000: begin                                    // MRS
          n_mrs++;
          if (!all_closed()) err("MRS with open banks");
          for (int k = 0; k < NUM_BANKS; k++) if (cyc < t_act_ok[k]) err("MRS before tRP");
          if (cyc - t_last_mrs < T_MRD) err("MRS before tMRD");
          t_last_mrs = cyc;
          t_mod = cyc + T_MOD;
          if (b < 4) begin
            mr[b] = addr;
            mr_seen[b] = 1;
          end
          if (b == 0) begin
            cl  = int'(addr[6:4]) + 4;
            bc4 = (addr[1:0] == 2'b10);
          end
          if (b == 2) cwl = int'(addr[5:3]) + 5;
        end
        4'b0001: begin                                    // REF
          n_ref++;
          if (!all_closed()) err("REF with open banks");
          for (int k = 0; k < NUM_BANKS; k++) if (cyc < t_act_ok[k]) err("REF before tRP");
          if (max_ref_gap != 0 && zq_done && cyc - t_last_ref > max_ref_gap)
            err($sformatf("refresh gap %0d too long", cyc - t_last_ref));
          if (trace) $display("DDR3 MODEL: REF @%0d", cyc);
          t_last_ref = cyc;
          t_block = cyc + T_RFC;
        end
        4'b0010: begin                                    // PRE / PREA
          if (addr[10]) begin
            n_prea++;
            for (int k = 0; k < NUM_BANKS; k++) if (is_open[k]) close_bank(k);
          end else begin
            n_pre++;
            if (is_open[b]) close_bank(b);
          end
        end
        4'b0011: begin                                    // ACT
          n_act++;
          if (mr_seen != 4'hF || !zq_done) err("ACT before initialization complete");
          if (is_open[b]) err($sformatf("ACT to open bank %0d", b));
          if (cyc < t_act_ok[b]) err($sformatf("ACT bank %0d before tRP/tRC/tRFC", b));
          if (cyc - t_last_act < T_RRD) err("ACT before tRRD");
          is_open[b]  = 1;
          open_row[b] = addr[ROW_W-1:0];
          t_act[b]    = cyc;
          t_last_act  = cyc;
          t_act_ok[b] = cyc + T_RC;
          t_pre_ok[b] = 0;
        end
        4'b0100, 4'b0101: begin                           // WR / RD
          bit rd;
          int unsigned key;
          rd  = we_n;
          key = {ba, open_row[b], addr[COL_W-1:0]};
          if (!is_open[b]) err($sformatf("%s to closed bank %0d", rd ? "RD" : "WR", b));
          if (cyc - t_act[b] < T_RCD) err("RD/WR before tRCD");
          if (cyc - t_last_col < T_CCD) err("RD/WR before tCCD");
          t_last_col = cyc;
          if (rd) begin
            if (cyc - t_last_wr < cwl + 4 + T_WTR) err("RD before tWTR");
            t_last_rd = cyc;
            rq.push_back('{due: cyc + cl, key: key});
            t_pre_ok[b] = maxl(t_pre_ok[b], cyc + T_RTP);
            if (addr[10]) n_rda++; else n_rd++;
          end else begin
            if (cyc - t_last_rd < cl + T_CCD + 2 - cwl) err("WR too soon after RD");
            t_last_wr = cyc;
            wq.push_back('{due: cyc + cwl, key: key});
            t_pre_ok[b] = maxl(t_pre_ok[b], cyc + cwl + 4 + T_WR);
            for (int k = 0; k < (bc4 ? ODTH4 : ODTH8); k++) odt_need[cyc + cwl - 2 + k] = 1;
            if (addr[10]) n_wra++; else n_wr++;
          end
          if (addr[10]) begin                             // auto-precharge
            is_open[b]  = 0;
            t_act_ok[b] = maxl(t_act_ok[b], maxl(t_act[b] + T_RAS, t_pre_ok[b]) + T_RP);
          end
        end
        4'b0110: begin                                    // ZQCL
          n_zq++;
          if (mr_seen != 4'hF) err("ZQCL before all mode registers set");
          if (!all_closed()) err("ZQCL with open banks");
          zq_done = 1;
          t_block = cyc + T_ZQINIT;
          t_last_ref = cyc + T_ZQINIT;
        end
        default: err($sformatf("unsupported command %b", pins));
      endcase
    end
    cke_q = cke;

    // ------------------------------------------------------------ data
    if (wrdata_en) begin
      if (wq.size() == 0 || wq[0].due != cyc) err("write data at the wrong time");
      if (wq.size() != 0) begin
        store[wq[0].key] = wrdata;
        void'(wq.pop_front());
        n_wdata++;
      end
    end else if (wq.size() != 0 && wq[0].due <= cyc) begin
      err("write data missing");
      void'(wq.pop_front());
    end

    rddata_valid <= 1'b0;
    if (rq.size() != 0 && rq[0].due == cyc) begin
      rddata_valid <= 1'b1;
      rddata       <= store.exists(rq[0].key) ? store[rq[0].key] : fill(rq[0].key);
      void'(rq.pop_front());
      n_rdata++;
    end

    // ------------------------------------------------------------- ODT
    if (odt) n_odt_cycles++;
    if (odt_check) begin
      if (odt_need.exists(cyc) && !odt) err("ODT low during a write burst window");
      if (!odt_need.exists(cyc) && odt) err("ODT high outside a write window");
    end
    if (odt_need.exists(cyc)) odt_need.delete(cyc);
  endtask

endmodule
