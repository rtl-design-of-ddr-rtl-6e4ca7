// ddr_clock: forwarded differential clock for the DDR SDRAM.
//
// The memory clock pair ddr_clk/ddr_clkb is the controller clock clk
// retimed by a register on the falling edge of clk2x, so it lags clk by a
// quarter clk period. Commands and addresses, which leave the controller on
// the rising edge of clk, are therefore sampled by the memory a quarter
// period after they change, and write DQS (launched on the falling edge of
// clk2x) is edge-aligned with the memory clock. clk2x must be twice clk and
// rise together with every rising edge of clk.
// The document shows a Clock block that takes clk and clk2x and produces
// ddr_clk and ddr_clkb; the quarter-period retiming is this design's choice.
module ddr_clock (
  input  logic clk,
  input  logic clk2x,
  output logic ddr_clk,
  output logic ddr_clkb
);

  always_ff @(negedge clk2x) begin
    ddr_clk  <= clk;
    ddr_clkb <= !clk;
  end

endmodule
