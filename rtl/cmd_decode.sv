// cmd_decode: command decode logic.
//
// Combinational.  Takes the request at the head of the command queue, splits
// its address into bank, row and column and looks the bank up in the bank
// management state, so that the command application logic sees at once
// whether the request hits the open row, needs the open row closed first
// (miss), or needs only an activate (bank closed).  The address map
// {row, bank, burst column} places consecutive bursts in one row and the
// next row of the same bank NUM_BANKS rows away; that map and the
// burst-aligned column (A2:A0 = 0) are this design's choice.  For an MRS
// request the two low address bits name the mode register.
module cmd_decode
  import ddr3_pkg::*;
(
  input  logic                          req_valid,
  input  user_req_t                     req,
  input  logic [NUM_BANKS-1:0]          bank_open,
  input  logic [NUM_BANKS-1:0][ROW_W-1:0] bank_row,
  output logic                          dec_valid,
  output dec_req_t                      dec
);

  always_comb begin
    dec_valid     = req_valid;
    dec           = '0;
    dec.bank      = req.addr[CBURST_W +: BANK_W];
    dec.row       = req.addr[CBURST_W + BANK_W +: ROW_W];
    dec.col       = {req.addr[CBURST_W-1:0], 3'b000};
    dec.mr        = req.addr[1:0];
    dec.is_rd     = (req.op == OP_READ)  || (req.op == OP_READ_AP);
    dec.is_wr     = (req.op == OP_WRITE) || (req.op == OP_WRITE_AP);
    dec.ap        = (req.op == OP_READ_AP) || (req.op == OP_WRITE_AP);
    dec.is_mrs    = (req.op == OP_MRS);
    dec.is_sr     = (req.op == OP_SELF_REFRESH);
    dec.is_pd     = (req.op == OP_POWER_DOWN);
    dec.is_rst    = (req.op == OP_MEM_RESET);
    dec.bank_open = bank_open[dec.bank];
    dec.row_hit   = bank_open[dec.bank] && (bank_row[dec.bank] == dec.row);
  end

endmodule
