// ddr3_data_path: write and read data alignment between the user port and
// the memory-side data port.
//
// Data cross the memory-side port one whole burst (8 x DQ_W bits, an 8n-bit
// word) per transfer; the double-data-rate I/O cells that turn it into eight
// half-cycle beats on DQ are outside this RTL.  Write data are captured in a
// small FIFO when a write command is issued and presented on mem_wrdata
// with mem_wrdata_en exactly CWL cycles after the write command reaches the
// pins (the command pins are registered, so CWL + 1 cycles after wr_issue).
// Read data returned by the memory side (mem_rddata_valid, CL cycles after
// the read command on the pins) are registered once and handed to the user
// in request order on rd_valid/rd_data.  All of this is this design's own
// choice; cwl must be 5..MAX_CWL.
module ddr3_data_path
  import ddr3_pkg::*;
#(
  parameter int unsigned MAX_CWL = 8,
  parameter int unsigned FIFO_D  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        cwl,
  input  logic              wr_issue,
  input  logic [WORD_W-1:0] wdata,
  output logic              mem_wrdata_en,
  output logic [WORD_W-1:0] mem_wrdata,
  input  logic              mem_rddata_valid,
  input  logic [WORD_W-1:0] mem_rddata,
  output logic              rd_valid,
  output logic [WORD_W-1:0] rd_data
);

  logic [MAX_CWL-1:0]        hist_q;   // hist_q[i]: write issued i+1 cycles ago
  logic [WORD_W-1:0]         fifo_q [FIFO_D];
  logic [$clog2(FIFO_D)-1:0] wp_q, rp_q;
  logic                      due;
  logic [3:0]                tap;

  assign tap = cwl - 4'd1;
  assign due = hist_q[tap[$clog2(MAX_CWL)-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q        <= '0;
      wp_q          <= '0;
      rp_q          <= '0;
      mem_wrdata_en <= 1'b0;
      mem_wrdata    <= '0;
      rd_valid      <= 1'b0;
      rd_data       <= '0;
    end else begin
      hist_q        <= {hist_q[MAX_CWL-2:0], wr_issue};
      mem_wrdata_en <= due;
      if (wr_issue) wp_q <= wp_q + 1'b1;
      if (due) begin
        mem_wrdata <= fifo_q[rp_q];
        rp_q       <= rp_q + 1'b1;
      end
      rd_valid <= mem_rddata_valid;
      if (mem_rddata_valid) rd_data <= mem_rddata;
    end
  end

  always_ff @(posedge clk)
    if (wr_issue) fifo_q[wp_q] <= wdata;

endmodule
