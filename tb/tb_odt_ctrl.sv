// tb_odt_ctrl: checks the ODT window.  For CWL 5 to 8, BL8 and BC4, single
// writes and writes tCCD = 4 apart, it builds the expected ODT waveform from
// the JEDEC rule (high from CWL - 2 after the write reaches the pins, which
// is one cycle after wr_issue, for 6 cycles for BL8 and 4 for BC4) and
// compares every cycle.  With enable low ODT must stay low.
`timescale 1ns/1ps
module tb_odt_ctrl;
  logic       clk = 0, rst_n = 0, enable = 1, wr_issue = 0, bc4 = 0, odt;
  logic [3:0] cwl = 4'd5;
  int checks = 0, failures = 0, high_cycles = 0;

  odt_ctrl dut (.*);
  always #5 clk = ~clk;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run a pattern of writes (issue cycles given) and compare the waveform
  task automatic run(input int c, input bit chop, input bit en, input int n, input int gap);
    bit want [200];
    int hold;
    hold = chop ? 4 : 6;
    foreach (want[i]) want[i] = 0;
    for (int k = 0; k < n; k++)
      for (int j = 0; j < hold; j++) want[10 + k * gap + 1 + c - 2 + j] = en;
    cwl = 4'(c); bc4 = chop; enable = en;
    for (int t = 0; t < 80; t++) begin
      @(negedge clk);
      wr_issue = 0;
      for (int k = 0; k < n; k++) if (t == 10 + k * gap) wr_issue = 1;
      #1;
      // odt seen in cycle t is the registered result
      check(odt == want[t], $sformatf("CWL %0d %s en %0d n %0d: ODT in cycle %0d", c,
                                      chop ? "BC4" : "BL8", en, n, t));
      if (odt) high_cycles++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 5; c <= 8; c++) begin
      run(c, 0, 1, 1, 0);
      run(c, 1, 1, 1, 0);
      run(c, 0, 1, 3, 4);
      run(c, 1, 1, 2, 8);
      run(c, 0, 0, 2, 4);
    end
    check(high_cycles > 0, "ODT was driven");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
