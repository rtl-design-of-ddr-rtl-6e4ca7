// user_interface: input registers between the user logic and the controller.
//
// Every user-side input (u_cmd, u_addr, u_data_i) is registered once on the
// rising edge of clk before it reaches the controller, so the controller
// sees clean, clock-aligned signals and the user logic sees a register
// load. The active-low reset u_reset_n is synchronised by two flip-flops and
// turned into the active-high synchronous reset used inside the controller;
// while it is active the registered command is forced to NOP.
// Timing: everything the user drives in cycle n reaches the controller in
// cycle n + 1, so the relative timing of command and write data is kept.
// The document says this module holds the I/O registers that latch the
// system signals; the reset synchroniser is this design's choice.
module user_interface
  import ddr_pkg::*;
(
  input  logic               clk,
  input  logic               u_reset_n,
  input  logic [7:1]         u_cmd,
  input  logic [UADDR_W-1:0] u_addr,
  input  logic [UDATA_W-1:0] u_data_i,
  output logic               reset,
  output logic [7:1]         cmd_q,
  output logic [UADDR_W-1:0] addr_q,
  output logic [UDATA_W-1:0] data_q
);

  logic [1:0] rst_sync;

  always_ff @(posedge clk) begin
    rst_sync <= {rst_sync[0], u_reset_n};
  end

  assign reset = !rst_sync[1];

  always_ff @(posedge clk) begin
    cmd_q  <= reset ? 7'(UCMD_NOP) : u_cmd;
    addr_q <= u_addr;
    data_q <= u_data_i;
  end

endmodule
