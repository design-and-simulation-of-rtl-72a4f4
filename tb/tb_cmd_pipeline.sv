// tb_cmd_pipeline: checks the three-entry command queue against a reference
// queue under random pushes and pops: order and contents of every entry,
// in_ready low exactly when three entries are held and none leaves, the
// entry count, and a push into a full queue in the same cycle as a pop.
`timescale 1ns/1ps
module tb_cmd_pipeline;
  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data = '0, out_data;
  logic [1:0]  count;
  logic [15:0] ref_q [$];
  int checks = 0, failures = 0, full_seen = 0, push_pop_full = 0;

  cmd_pipeline #(.WIDTH(16), .DEPTH(3)) dut (.*);

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 99) < 60);
      in_data   = 16'($urandom);
      out_ready = ($urandom_range(0, 99) < (i < 1500 ? 35 : 70));
      #1;
      check(count == 2'(ref_q.size()), "entry count");
      check(out_valid == (ref_q.size() != 0), "out_valid");
      check(in_ready == (ref_q.size() < 3 || out_ready), "in_ready");
      if (ref_q.size() != 0) check(out_data == ref_q[0], "head entry");
      if (ref_q.size() == 3) full_seen++;
      @(posedge clk);
      if (out_valid && out_ready) void'(ref_q.pop_front());
      if (in_valid && in_ready) begin
        if (ref_q.size() == 2 && out_valid && out_ready && count == 2'd3) push_pop_full++;
        ref_q.push_back(in_data);
      end
    end
    check(full_seen > 0, "queue filled up");
    check(push_pop_full > 0, "push and pop on a full queue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
