// clock_sync: clock synchronization module.
//
// Derives the memory clock, which also clocks the controller, from the input
// clock: out_clk toggles every sync_factor input cycles, so its period is
// 2 * sync_factor input periods (a factor of 0 acts as 1).  With a 600-800 MHz
// input and a factor of 1 the result lies in the 300-400 MHz memory clock
// range the controller is built for.  The factor is sampled whenever a
// half-period ends, so it may change while running without a short pulse.
// A two-flop synchronizer releases rst_n_out on out_clk, so the logic fed
// by out_clk leaves reset cleanly; assertion is asynchronous.
// The divider and the reset synchronizer are this design's own choice; the
// factor input and out_clk follow the module's published simulation.
module clock_sync #(
  parameter int unsigned FACTOR_W = 8
) (
  input  logic                clk_in,
  input  logic                rst_n,
  input  logic [FACTOR_W-1:0] sync_factor,
  output logic                out_clk,
  output logic                rst_n_out
);

  logic [FACTOR_W-1:0] cnt_q;
  logic [FACTOR_W-1:0] limit;
  logic [1:0]          rst_sync_q;

  assign limit = (sync_factor == '0) ? FACTOR_W'(0) : sync_factor - FACTOR_W'(1);

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= '0;
      out_clk <= 1'b0;
    end else if (cnt_q >= limit) begin
      cnt_q   <= '0;
      out_clk <= ~out_clk;
    end else begin
      cnt_q   <= cnt_q + FACTOR_W'(1);
    end
  end

  always_ff @(posedge out_clk or negedge rst_n) begin
    if (!rst_n) rst_sync_q <= 2'b00;
    else        rst_sync_q <= {rst_sync_q[0], 1'b1};
  end

  assign rst_n_out = rst_sync_q[1];

endmodule
