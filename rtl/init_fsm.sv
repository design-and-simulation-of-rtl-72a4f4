// init_fsm: DDR3 power-up and initialization sequence.
//
// After reset it walks the JEDEC DDR3 sequence:
//   RESET# low for P_RESET cycles (CKE low)
//   RESET# high, CKE still low for P_CKEON cycles
//   CKE high, P_XPR cycles before the first command
//   MRS MR2, MR3, MR1, MR0 (MR0 with DLL reset), tMRD apart, tMOD after MR0
//   ZQCL, then P_ZQINIT cycles of calibration
// and then raises done and stays there until restart, which takes it back
// to the start of the sequence (RESET# low again) to reset and initialize
// the memory a second time.  The mode register contents come
// from the configuration registers (cfg): burst length, CAS latency and
// write recovery in MR0, RTT_Nom in MR1, CAS write latency and RTT_WR in
// MR2.  Outputs are one command per cycle (NOP while waiting) for the
// address/command decode block, plus RESET# and CKE.  The defaults are the
// JEDEC times at 400 MHz; testbenches shorten the two long power-up waits.
// That the controller performs initialization, sets the burst length in
// MR0 during it, and can reset the memory again later follows the design;
// the sequence itself is the standard's.
module init_fsm
  import ddr3_pkg::*;
#(
  parameter int unsigned P_RESET  = T_RESET,
  parameter int unsigned P_CKEON  = T_CKEON,
  parameter int unsigned P_XPR    = T_XPR,
  parameter int unsigned P_MRD    = T_MRD,
  parameter int unsigned P_MOD    = T_MOD,
  parameter int unsigned P_ZQINIT = T_ZQINIT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cfg_t              cfg,
  input  logic              restart,
  output mem_cmd_e          cmd,
  output logic [BANK_W-1:0] ba,
  output logic [ADDR_W-1:0] addr,
  output logic              cke,
  output logic              reset_n,
  output logic              done
);

  typedef enum logic [3:0] {
    S_RESET, S_CKEON, S_XPR, S_MR2, S_MR3, S_MR1, S_MR0, S_ZQCL, S_ZQWAIT, S_DONE
  } state_e;

  state_e      state_q;
  logic [17:0] wait_q;     // cycles still to wait in the current state

  // The command of a state goes out on the first cycle spent in it.
  always_comb begin
    cmd     = CMD_NOP;
    ba      = '0;
    addr    = '0;
    cke     = 1'b1;
    reset_n = 1'b1;
    done    = 1'b0;
    unique case (state_q)
      S_RESET: begin cke = 1'b0; reset_n = 1'b0; end
      S_CKEON: cke = 1'b0;
      S_MR2:  if (wait_q == 18'(P_MRD - 1)) begin cmd = CMD_MRS; ba = 3'd2; addr = mr2_value(cfg); end
      S_MR3:  if (wait_q == 18'(P_MRD - 1)) begin cmd = CMD_MRS; ba = 3'd3; addr = '0; end
      S_MR1:  if (wait_q == 18'(P_MRD - 1)) begin cmd = CMD_MRS; ba = 3'd1; addr = mr1_value(cfg); end
      S_MR0:  if (wait_q == 18'(P_MOD - 1)) begin cmd = CMD_MRS; ba = 3'd0; addr = mr0_value(cfg, 1'b1); end
      S_ZQCL: cmd = CMD_ZQCL;
      S_DONE: done = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_RESET;
      wait_q  <= 18'(P_RESET - 1);
    end else if (restart) begin
      state_q <= S_RESET;
      wait_q  <= 18'(P_RESET - 1);
    end else if (state_q != S_DONE) begin
      if (wait_q != '0) begin
        wait_q <= wait_q - 18'd1;
      end else begin
        unique case (state_q)
          S_RESET:  begin state_q <= S_CKEON;  wait_q <= 18'(P_CKEON - 1); end
          S_CKEON:  begin state_q <= S_XPR;    wait_q <= 18'(P_XPR - 1); end
          S_XPR:    begin state_q <= S_MR2;    wait_q <= 18'(P_MRD - 1); end
          S_MR2:    begin state_q <= S_MR3;    wait_q <= 18'(P_MRD - 1); end
          S_MR3:    begin state_q <= S_MR1;    wait_q <= 18'(P_MRD - 1); end
          S_MR1:    begin state_q <= S_MR0;    wait_q <= 18'(P_MOD - 1); end
          S_MR0:    begin state_q <= S_ZQCL;   wait_q <= '0; end
          S_ZQCL:   begin state_q <= S_ZQWAIT; wait_q <= 18'(P_ZQINIT - 2); end
          default:  state_q <= S_DONE;
        endcase
      end
    end
  end

endmodule
