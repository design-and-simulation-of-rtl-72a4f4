// addr_cmd_decode: address and command decode.
//
// Turns the controller's internal command (ddr3_pkg::mem_cmd_e) with its bank
// and row/column address into the DDR3 command pins following the JEDEC
// truth table: CS#, RAS#, CAS#, WE#, BA and A, with A10 carrying
// auto-precharge (RDA/WRA), precharge-all (PREA) and ZQ long (ZQCL), and A12
// set on reads and writes (full BL8 when on-the-fly burst chop is enabled).
// CKE is passed along with the command.  All pins are registered, so the
// pins show a command one cycle after it is issued; the other pin-side
// timing (write data, ODT) is aligned to this one-cycle delay.  After reset
// the pins hold NOP with CKE low.
module addr_cmd_decode
  import ddr3_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  mem_cmd_e          cmd,
  input  logic [BANK_W-1:0] ba,
  input  logic [ADDR_W-1:0] addr,
  input  logic              cke,
  output logic              ddr_cke,
  output logic              ddr_cs_n,
  output logic              ddr_ras_n,
  output logic              ddr_cas_n,
  output logic              ddr_we_n,
  output logic [BANK_W-1:0] ddr_ba,
  output logic [ADDR_W-1:0] ddr_addr
);

  logic [3:0]        pins;   // {cs_n, ras_n, cas_n, we_n}
  logic [ADDR_W-1:0] a;

  always_comb begin
    a = addr;
    unique case (cmd)
      CMD_DES:  pins = 4'b1111;
      CMD_MRS:  pins = 4'b0000;
      CMD_REF:  pins = 4'b0001;
      CMD_PRE:  begin pins = 4'b0010; a[10] = 1'b0; end
      CMD_PREA: begin pins = 4'b0010; a = '0; a[10] = 1'b1; end
      CMD_ACT:  pins = 4'b0011;
      CMD_WR:   begin pins = 4'b0100; a[10] = 1'b0; a[12] = 1'b1; end
      CMD_WRA:  begin pins = 4'b0100; a[10] = 1'b1; a[12] = 1'b1; end
      CMD_RD:   begin pins = 4'b0101; a[10] = 1'b0; a[12] = 1'b1; end
      CMD_RDA:  begin pins = 4'b0101; a[10] = 1'b1; a[12] = 1'b1; end
      CMD_ZQCL: begin pins = 4'b0110; a = '0; a[10] = 1'b1; end
      default:  pins = 4'b0111;     // NOP
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ddr_cke   <= 1'b0;
      {ddr_cs_n, ddr_ras_n, ddr_cas_n, ddr_we_n} <= 4'b0111;
      ddr_ba    <= '0;
      ddr_addr  <= '0;
    end else begin
      ddr_cke   <= cke;
      {ddr_cs_n, ddr_ras_n, ddr_cas_n, ddr_we_n} <= pins;
      ddr_ba    <= ba;
      ddr_addr  <= a;
    end
  end

endmodule
