// tb_addr_cmd_decode: checks the address and command decode against the
// DDR3 command truth table: CS#/RAS#/CAS#/WE#, A10 (auto-precharge,
// precharge-all, ZQ long), A12 on column commands, bank and address passed
// through, CKE carried along, all one cycle after the input.
`timescale 1ns/1ps
module tb_addr_cmd_decode;
  import ddr3_pkg::*;
  logic              clk = 0, rst_n = 0;
  mem_cmd_e          cmd = CMD_NOP;
  logic [BANK_W-1:0] ba = '0;
  logic [ADDR_W-1:0] addr = '0;
  logic              cke = 0;
  logic              ddr_cke, ddr_cs_n, ddr_ras_n, ddr_cas_n, ddr_we_n;
  logic [BANK_W-1:0] ddr_ba;
  logic [ADDR_W-1:0] ddr_addr;
  int checks = 0, failures = 0;

  addr_cmd_decode dut (.*);
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

  initial begin
    repeat (2) @(negedge clk);
    check(!ddr_cke && ddr_cs_n == 0 && ddr_ras_n && ddr_cas_n && ddr_we_n, "reset: NOP, CKE low");
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      logic [3:0] e;
      logic [ADDR_W-1:0] a;
      int c;
      c = $urandom_range(0, 11);
      @(negedge clk);
      cmd = mem_cmd_e'(c); ba = BANK_W'($urandom); addr = ADDR_W'($urandom); cke = 1'($urandom);
      a = addr;
      case (c)
        0:  e = 4'b0111;                                  // NOP
        1:  e = 4'b1111;                                  // DES
        2:  e = 4'b0000;                                  // MRS
        3:  e = 4'b0001;                                  // REF
        4:  begin e = 4'b0010; a[10] = 0; end             // PRE
        5:  begin e = 4'b0010; a = 14'h0400; end          // PREA
        6:  e = 4'b0011;                                  // ACT
        7:  begin e = 4'b0100; a[10] = 0; a[12] = 1; end  // WR
        8:  begin e = 4'b0100; a[10] = 1; a[12] = 1; end  // WRA
        9:  begin e = 4'b0101; a[10] = 0; a[12] = 1; end  // RD
        10: begin e = 4'b0101; a[10] = 1; a[12] = 1; end  // RDA
        default: begin e = 4'b0110; a = 14'h0400; end     // ZQCL
      endcase
      @(negedge clk);
      check({ddr_cs_n, ddr_ras_n, ddr_cas_n, ddr_we_n} == e, $sformatf("pins for command %0d", c));
      check(ddr_addr == a, $sformatf("address for command %0d", c));
      check(ddr_ba == ba && ddr_cke == cke, "bank and CKE");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
