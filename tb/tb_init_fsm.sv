// tb_init_fsm: checks the initialization state machine with shortened
// power-up waits (RESET# low 30 cycles, CKE low 50 cycles, tXPR 10).  It
// logs every cycle and checks RESET# and CKE timing, the command order
// MR2, MR3, MR1, MR0, ZQCL, their spacing (tMRD 4, tMOD 12), the mode
// register values (burst length, CAS latency, write recovery, DLL reset,
// RTT_Nom, CAS write latency, RTT_WR, computed here from the JEDEC field
// layout), tZQinit before done, and that done stays high with NOPs after.
// It then pulses restart and checks the whole sequence a second time.
`timescale 1ns/1ps
module tb_init_fsm;
  import ddr3_pkg::*;
  localparam int R = 30, C = 50, X = 10, ZQ = 40;
  logic              clk = 0, rst_n = 0, restart = 0;
  cfg_t              cfg;
  mem_cmd_e          cmd;
  logic [BANK_W-1:0] ba;
  logic [ADDR_W-1:0] addr;
  logic              cke, reset_n, done;
  int checks = 0, failures = 0;

  init_fsm #(.P_RESET(R), .P_CKEON(C), .P_XPR(X), .P_ZQINIT(ZQ)) dut (.*);
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

  task automatic run_sequence(input string pass);
    int t_reset_hi = -1, t_cke_hi = -1, t_done = -1, nmrs = 0, t_zq = -1;
    int t_mrs [4];
    logic [ADDR_W-1:0] v [4];
    int order [4];
    for (int t = 0; t < 400; t++) begin
      #1;
      if (t_reset_hi < 0 && reset_n) t_reset_hi = t;
      if (t_cke_hi < 0 && cke) t_cke_hi = t;
      if (t_reset_hi < 0) check(!cke && !done, {pass, "CKE low while RESET# low"});
      if (cmd == CMD_MRS) begin
        order[nmrs] = int'(ba);
        t_mrs[nmrs] = t;
        v[ba[1:0]] = addr;
        nmrs++;
      end else if (cmd == CMD_ZQCL) begin
        t_zq = t;
      end else if (cmd != CMD_NOP) check(0, {pass, "unexpected command"});
      if (t_done < 0 && done) t_done = t;
      if (t_done >= 0) check(done && cmd == CMD_NOP && cke && reset_n, {pass, "stays done"});
      @(negedge clk);
    end
    check(t_reset_hi == R, $sformatf("RESET# low for %0d cycles", t_reset_hi));
    check(t_cke_hi - t_reset_hi == C, $sformatf("CKE low for %0d cycles after RESET#", t_cke_hi - t_reset_hi));
    check(nmrs == 4 && order[0] == 2 && order[1] == 3 && order[2] == 1 && order[3] == 0,
          "MRS order MR2, MR3, MR1, MR0");
    check(t_mrs[0] - t_cke_hi == X, "tXPR before the first MRS");
    check(t_mrs[1] - t_mrs[0] == T_MRD && t_mrs[2] - t_mrs[1] == T_MRD &&
          t_mrs[3] - t_mrs[2] == T_MRD, "tMRD between MRS");
    check(t_zq - t_mrs[3] == T_MOD, "tMOD before ZQCL");
    check(t_done - t_zq == ZQ, $sformatf("tZQinit before done: %0d", t_done - t_zq));
    // MR0: BC4 (A1:A0 = 10), CL 9 -> A6:A4 = 101, A2 = 0, DLL reset A8,
    // WR 6 -> A11:A9 = 010, A12 precharge power-down fast exit
    check(v[0] == 14'b01_0101_0101_0010, $sformatf("MR0 = %b", v[0]));
    // MR1: RTT_Nom 011 -> A9 = 0, A6 = 1, A2 = 1
    check(v[1] == 14'b00_0000_0100_0100, $sformatf("MR1 = %b", v[1]));
    // MR2: CWL 7 -> A5:A3 = 010, RTT_WR 10 -> A10:A9
    check(v[2] == 14'b00_0100_0001_0000, $sformatf("MR2 = %b", v[2]));
    check(v[3] == '0, {pass, "MR3 = 0"});
  endtask

  initial begin
    cfg = '{bl: 2'b10, cl: 4'd9, cwl: 4'd7, ref_en: 1'b1, odt_en: 1'b1, dyn_odt_en: 1'b1,
            rtt_nom: 3'b011, rtt_wr: 2'b10, refi16: 8'd195};
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_sequence("power-up: ");
    restart = 1;                         // memory reset: run it all again
    @(negedge clk);
    restart = 0;
    run_sequence("restart: ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
