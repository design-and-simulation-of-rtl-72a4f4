// tb_cmd_decode: checks the command decode logic with random requests and
// random bank states: bank/row/column split of the address, operation
// flags, mode register index, and page hit / miss / empty classification.
`timescale 1ns/1ps
module tb_cmd_decode;
  import ddr3_pkg::*;
  logic                            req_valid;
  user_req_t                       req;
  logic [NUM_BANKS-1:0]            bank_open;
  logic [NUM_BANKS-1:0][ROW_W-1:0] bank_row;
  logic                            dec_valid;
  dec_req_t                        dec;
  int checks = 0, failures = 0, hits = 0, misses = 0, empties = 0;

  cmd_decode dut (.*);

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int unsigned row, bank, cb, op;
      row  = $urandom_range(0, 3);
      bank = $urandom_range(0, 7);
      cb   = $urandom_range(0, 127);
      op   = $urandom_range(0, 7);
      req_valid = 1'($urandom);
      req.op    = user_op_e'(op);
      req.addr  = UADDR_W'((row << 10) | (bank << 7) | cb);   // {row, bank, column/8}
      req.wdata = '0;
      bank_open = NUM_BANKS'($urandom);
      for (int b = 0; b < NUM_BANKS; b++) bank_row[b] = ROW_W'($urandom_range(0, 3));
      #1;
      check(dec_valid == req_valid, "valid passes through");
      check(dec.bank == BANK_W'(bank) && dec.row == ROW_W'(row) && dec.col == COL_W'(cb * 8),
            "address split");
      check(dec.is_rd == (op == 0 || op == 2) && dec.is_wr == (op == 1 || op == 3) &&
            dec.ap == (op == 2 || op == 3) && dec.is_mrs == (op == 4) &&
            dec.is_sr == (op == 5) && dec.is_pd == (op == 6) &&
            dec.is_rst == (op == 7), "operation flags");
      check(dec.mr == 2'(cb), "mode register index");
      check(dec.bank_open == bank_open[bank], "bank open");
      check(dec.row_hit == (bank_open[bank] && bank_row[bank] == ROW_W'(row)), "row hit");
      if (dec.row_hit) hits++; else if (dec.bank_open) misses++; else empties++;
      #1;
    end
    check(hits > 0 && misses > 0 && empties > 0, "hit, miss and empty all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
