// config_interface: configuration register bank.
//
// NUM_REGS registers of 8 bits.  With load high, in_value is written into the
// register selected by register_number at the clock edge; with fetch high the
// selected register is copied to out_value, which holds its value until the
// next fetch.  If both are high in one cycle, out_value shows the value being
// written.  Every register is also visible on regs_flat, from which the
// controller takes its mode-register settings and feature enables (see
// ddr3_pkg for the map); registers the controller does not use are spare.
// The load/fetch/register_number/in_value/out_value interface follows the
// module's published simulation; 16 registers (register 15 is the highest
// one exercised there), the reset contents and the register map are this
// design's choice.
module config_interface #(
  parameter int unsigned NUM_REGS = 16,
  parameter int unsigned NUM_W    = 4,
  parameter logic [NUM_REGS*8-1:0] RESET_VALUES = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_W-1:0]      register_number,
  input  logic [7:0]            in_value,
  input  logic                  load,
  input  logic                  fetch,
  output logic [7:0]            out_value,
  output logic [NUM_REGS*8-1:0] regs_flat
);

  logic [7:0] regs_q [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs_q[i] <= RESET_VALUES[i*8 +: 8];
      out_value <= '0;
    end else begin
      if (load && (int'(register_number) < NUM_REGS))
        regs_q[register_number] <= in_value;
      if (fetch) begin
        if (int'(register_number) >= NUM_REGS) out_value <= '0;
        else if (load)                         out_value <= in_value;
        else                                   out_value <= regs_q[register_number];
      end
    end
  end

  always_comb
    for (int i = 0; i < NUM_REGS; i++) regs_flat[i*8 +: 8] = regs_q[i];

endmodule
