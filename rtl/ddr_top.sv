// ddr_top: DDR SDRAM controller with its user-side input registers.
//
// The top-level reference design: the user interface registers the user's
// command, address and write data and synchronises the reset, and the DDR
// controller turns user commands into DDR SDRAM commands, moves one 128-bit
// user word per clock to and from the 64-bit double-data-rate memory bus,
// and runs the memory's power-up sequence.
//
// Clocks: u_clk is the controller clock; u_clk2x is twice its frequency and
// rises with every rising edge of u_clk (both come from an on-chip clock
// manager that is not part of this design). The memory clock pair is
// generated inside. All user signals are sampled and driven on u_clk.
// Because of the input registers, every user-side latency listed for
// ddr_controller is one cycle longer here. Protocol: drive a command on
// u_cmd for one cycle, in a cycle in which u_busy is low and which does not
// directly follow the previous command; drive NOP otherwise. For a WRITE
// given in cycle n, word k of the burst must be on u_data_i in cycle
// n+1+T_RCD+k; for a READ given in cycle n, word k comes back with
// u_data_valid in cycle n+3+T_RCD+ceil(CL)+k; for a REFRESH given in
// cycle n, u_ref_ack is high in cycle n+2.
// ddr_dq and ddr_dqs are brought out as output, output enable and input,
// for the board-level bidirectional pads. ddr_dm is held low: the user
// side has no byte mask, so every write beat is stored whole.
module ddr_top
  import ddr_pkg::*;
#(
  parameter int unsigned T_RCD     = 3,
  parameter int unsigned T_RP      = 3,
  parameter int unsigned T_RFC     = 8,
  parameter int unsigned T_MRD     = 2,
  parameter int unsigned T_WR      = 2,
  parameter int unsigned T_RC      = 7,
  parameter int unsigned INIT_WAIT = 20000
) (
  input  logic               u_clk,
  input  logic               u_clk2x,
  input  logic               u_reset_n,
  input  logic [7:1]         u_cmd,
  input  logic [UADDR_W-1:0] u_addr,
  input  logic [UDATA_W-1:0] u_data_i,
  output logic [UDATA_W-1:0] u_data_o,
  output logic               u_data_valid,
  output logic               u_ref_ack,
  output logic               u_busy,
  output logic               ddr_clk,
  output logic               ddr_clkb,
  output logic               ddr_cke,
  output logic               ddr_csb,
  output logic               ddr_rasb,
  output logic               ddr_casb,
  output logic               ddr_web,
  output logic [BA_W-1:0]    ddr_ba,
  output logic [AD_W-1:0]    ddr_ad,
  output logic [DQ_W/8-1:0]  ddr_dm,
  output logic [DQ_W-1:0]    ddr_dq_o,
  output logic               ddr_dq_oe,
  input  logic [DQ_W-1:0]    ddr_dq_i,
  output logic [1:0]         ddr_dqs_o,
  output logic               ddr_dqs_oe
);

  logic               reset;
  logic [7:1]         cmd_q;
  logic [UADDR_W-1:0] addr_q;
  logic [UDATA_W-1:0] data_q;

  user_interface u_user_interface (
    .clk(u_clk), .u_reset_n(u_reset_n), .u_cmd(u_cmd), .u_addr(u_addr),
    .u_data_i(u_data_i), .reset(reset), .cmd_q(cmd_q), .addr_q(addr_q),
    .data_q(data_q)
  );

  ddr_controller #(
    .T_RCD(T_RCD), .T_RP(T_RP), .T_RFC(T_RFC), .T_MRD(T_MRD),
    .T_WR(T_WR), .T_RC(T_RC), .INIT_WAIT(INIT_WAIT)
  ) u_ddr_controller (
    .clk(u_clk), .clk2x(u_clk2x), .reset(reset),
    .u_cmd(cmd_q), .u_addr(addr_q), .u_data_i(data_q),
    .u_data_o(u_data_o), .u_data_valid(u_data_valid),
    .u_ref_ack(u_ref_ack), .u_busy(u_busy),
    .ddr_clk(ddr_clk), .ddr_clkb(ddr_clkb), .ddr_cke(ddr_cke), .ddr_csb(ddr_csb),
    .ddr_rasb(ddr_rasb), .ddr_casb(ddr_casb), .ddr_web(ddr_web),
    .ddr_ba(ddr_ba), .ddr_ad(ddr_ad), .ddr_dm(ddr_dm),
    .ddr_dq_o(ddr_dq_o), .ddr_dq_oe(ddr_dq_oe), .ddr_dq_i(ddr_dq_i),
    .ddr_dqs_o(ddr_dqs_o), .ddr_dqs_oe(ddr_dqs_oe)
  );

endmodule
