// tb_config_interface: checks the configuration register bank.  Reset
// contents; the published example (51 loaded into register 15 and fetched
// back); every register written with a random value and fetched back;
// out_value holding while fetch is low; a load and a fetch of the same
// register in one cycle; regs_flat mirroring every register.
`timescale 1ns/1ps
module tb_config_interface;
  import ddr3_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic [3:0] register_number = '0;
  logic [7:0] in_value = '0;
  logic       load = 0, fetch = 0;
  logic [7:0] out_value;
  logic [CFG_NUM_REGS*8-1:0] regs_flat;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  config_interface #(.NUM_REGS(16), .NUM_W(4), .RESET_VALUES(CFG_RESET)) dut (.*);

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

  task automatic cycle(input int r, input int v, input bit ld, input bit ft);
    @(negedge clk);
    register_number = 4'(r); in_value = 8'(v); load = ld; fetch = ft;
    @(negedge clk);
    load = 0; fetch = 0;
  endtask

  initial begin
    // expected power-up contents, written out independently of the package
    model = '{8'h00, 8'd6, 8'd5, 8'h07, 8'h01, 8'h01, 8'd195, 8'h00,
              8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 16; r++) begin
      cycle(r, 0, 0, 1);
      check(out_value == model[r], $sformatf("reset value of register %0d", r));
    end
    cycle(15, 51, 1, 0);
    cycle(15, 0, 0, 1);
    check(out_value == 8'd51, "register 15 holds 51");
    model[15] = 8'd51;
    for (int r = 0; r < 16; r++) begin
      int v = $urandom_range(0, 255);
      cycle(r, v, 1, 0);
      model[r] = 8'(v);
    end
    for (int r = 15; r >= 0; r--) begin
      cycle(r, 0, 0, 1);
      check(out_value == model[r], $sformatf("read back register %0d", r));
      repeat (2) @(negedge clk);
      check(out_value == model[r], "out_value holds without fetch");
    end
    for (int r = 0; r < 16; r++)
      check(regs_flat[r*8 +: 8] == model[r], $sformatf("regs_flat register %0d", r));
    cycle(7, 8'hA5, 1, 1);
    check(out_value == 8'hA5, "load and fetch in one cycle show the new value");
    cycle(7, 0, 0, 1);
    check(out_value == 8'hA5, "register 7 written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
