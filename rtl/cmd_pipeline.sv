// cmd_pipeline: command queue between the user port and the command decode
// logic, three entries deep.
//
// A first-in first-out buffer with a valid/ready handshake on both sides: a
// request is accepted at a clock edge where in_valid and in_ready are high,
// and the head entry leaves when out_valid and out_ready are high.  in_ready
// is low only when all DEPTH entries are full; a full queue accepts a new
// request in the same cycle that its head leaves.  The head is presented
// from storage with no added latency, so a request written into an empty
// queue is visible at the output in the next cycle.  The depth of three
// follows the design's three-stage command queue; the handshake is this
// design's choice.
module cmd_pipeline #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem_q [DEPTH];
  logic [PTR_W-1:0] rd_q, wr_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;
  logic push, pop;

  assign out_valid = (cnt_q != '0);
  assign in_ready  = (int'(cnt_q) < DEPTH) || out_ready;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem_q[rd_q];
  assign count     = cnt_q;

  function automatic logic [PTR_W-1:0] incr(input logic [PTR_W-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + PTR_W'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push) wr_q <= incr(wr_q);
      if (pop)  rd_q <= incr(rd_q);
      case ({push, pop})
        2'b10:   cnt_q <= cnt_q + 1'b1;
        2'b01:   cnt_q <= cnt_q - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (push) mem_q[wr_q] <= in_data;

  // A full queue must not accept unless its head leaves in the same cycle.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (int'(cnt_q) < DEPTH) || pop);

endmodule
