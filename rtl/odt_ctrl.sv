// odt_ctrl: on-die termination control.
//
// Drives the DDR3 ODT pin for a single-rank system: termination is switched
// on around every write burst and off otherwise.  For a write command that
// reaches the pins in cycle w (one cycle after wr_issue), ODT goes high in
// cycle w + CWL - 2 (ODTLon with no additive latency) and stays high for
// ODTH8 = 6 cycles after a BL8 write or ODTH4 = 4 after a BC4 write; writes
// closer together keep it high.  The memory itself switches between RTT_Nom
// and RTT_WR during the burst (dynamic ODT), so the controller needs no mode
// register write to change the termination; the values come from MR1/MR2.
// enable gates the whole function.  The window is the JEDEC one; that ODT is
// driven only for writes is this design's choice.  cwl must be 5..MAX_CWL.
module odt_ctrl
  import ddr3_pkg::*;
#(
  parameter int unsigned MAX_CWL = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       wr_issue,
  input  logic [3:0] cwl,
  input  logic       bc4,
  output logic       odt
);

  logic [MAX_CWL-3:0] hist_q;   // hist_q[i]: write issued i+1 cycles ago
  logic [2:0]         cnt_q;
  logic               trigger;
  logic [3:0]         tap;

  assign tap     = cwl - 4'd3;
  assign trigger = enable && hist_q[tap[$clog2(MAX_CWL-2)-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q <= '0;
      cnt_q  <= '0;
    end else begin
      hist_q <= {hist_q[MAX_CWL-4:0], wr_issue};
      if (trigger)           cnt_q <= bc4 ? 3'(ODTH4) : 3'(ODTH8);
      else if (cnt_q != '0)  cnt_q <= cnt_q - 3'd1;
    end
  end

  assign odt = (cnt_q != '0);

endmodule
