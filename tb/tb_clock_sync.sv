// tb_clock_sync: checks the clock synchronization module.  For sync_factor
// 2 (the value of the module's published simulation), 1, 3, 5 and 0 it
// measures the period and high time of out_clk in input-clock cycles
// (expected 2 x factor and factor, with 0 acting as 1), and checks that the
// synchronized reset is released only after two out_clk edges.
`timescale 1ns/1ps
module tb_clock_sync;
  logic       clk_in = 0, rst_n = 1;
  logic [7:0] sync_factor = 8'd2;
  logic       out_clk, rst_n_out;
  int checks = 0, failures = 0;
  int in_cyc = 0;

  clock_sync dut (.*);

  always #5 clk_in = ~clk_in;
  always @(posedge clk_in) in_cyc++;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  initial begin
    repeat (2000) @(posedge clk_in);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int f, input int expect_half);
    int t_rise, t_fall, t_rise2;
    sync_factor = 8'(f);
    repeat (3) @(posedge out_clk);        // settle
    @(posedge out_clk); t_rise = in_cyc;
    @(negedge out_clk); t_fall = in_cyc;
    @(posedge out_clk); t_rise2 = in_cyc;
    check(t_rise2 - t_rise == 2 * expect_half,
          $sformatf("factor %0d: period %0d input cycles", f, t_rise2 - t_rise));
    check(t_fall - t_rise == expect_half,
          $sformatf("factor %0d: high time %0d input cycles", f, t_fall - t_rise));
  endtask

  initial begin
    #1 rst_n = 0;                         // a reset edge for the asynchronous flops
    repeat (3) @(posedge clk_in);
    check(!rst_n_out && !out_clk, "held in reset");
    #2 rst_n = 1;
    @(posedge out_clk);
    #1 check(!rst_n_out, "reset still held after one out_clk edge");
    @(posedge out_clk);
    #1 check(rst_n_out, "reset released after two out_clk edges");
    measure(2, 2);
    measure(1, 1);
    measure(3, 3);
    measure(5, 5);
    measure(0, 1);
    #2 rst_n = 0;
    #1 check(!rst_n_out, "reset asserts at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
