// ddr_controller: the DDR SDRAM controller core.
//
// Wires together the blocks of the controller architecture: the clock block
// that forwards the memory clock, the controller state machine, its three
// counters (burst, CAS latency and RAS-to-CAS delay), the address latch and
// the data path. The user side is single data rate (one 128-bit word per
// clk); the memory side is a 64-bit DDR SDRAM interface with burst length
// 4 and CAS latency 2 after power-up, changeable with LOAD_MR commands to
// burst length 2 or 8 and CAS latency 2.5 or 3.
//
// User timing (cycles of clk as seen at this module's inputs; see the
// controller for the states):
//   - a command on u_cmd is accepted in a cycle with u_busy low;
//   - WRITE accepted in cycle n: ACT in n+1, WRITE in n+1+T_RCD; word k of
//     the burst must be on u_data_i in cycle n+1+T_RCD+k;
//   - READ accepted in cycle n: READ in r = n+1+T_RCD; word k of the burst
//     is on u_data_o with u_data_valid in cycle r+1+ceil(CL)+k;
//   - REFRESH accepted in cycle n: u_ref_ack is high in cycle n+1.
// ddr_dm is held low: the user interface has no byte mask, so every write
// beat is stored whole. ddr_dq and ddr_dqs are split into output, output
// enable and input for the bidirectional pads outside this module.
module ddr_controller
  import ddr_pkg::*;
#(
  parameter int unsigned T_RCD     = 3,
  parameter int unsigned T_RP      = 3,
  parameter int unsigned T_RFC     = 8,
  parameter int unsigned T_MRD     = 2,
  parameter int unsigned T_WR      = 2,
  parameter int unsigned T_RC      = 7,
  parameter int unsigned INIT_WAIT = 20000,
  parameter logic [AD_W-1:0] MR_INIT  = MR_BL4_CL2,
  parameter logic [AD_W-1:0] EMR_INIT = '0
) (
  input  logic               clk,
  input  logic               clk2x,
  input  logic               reset,
  // user side
  input  logic [7:1]         u_cmd,
  input  logic [UADDR_W-1:0] u_addr,
  input  logic [UDATA_W-1:0] u_data_i,
  output logic [UDATA_W-1:0] u_data_o,
  output logic               u_data_valid,
  output logic               u_ref_ack,
  output logic               u_busy,
  // memory side
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

  logic       burst_end, cas_lat_end, rcd_end;
  logic       burst_2, burst_8;
  logic [1:0] burst_max, cas_lat_max, cas_lat_half;
  logic       ld_burst, ld_cas_lat, ld_rcd, ld_addr;
  logic [3:0] rcd_val;
  logic       mrs_addr, row_addr;
  mrs_src_e   mrs_src;
  logic       ddr_dqs_t, u_data_valid_en;
  logic [7:0] ddr_write_en;
  logic [3:0] ddr_read_en;

  ddr_clock u_clock (
    .clk(clk), .clk2x(clk2x), .ddr_clk(ddr_clk), .ddr_clkb(ddr_clkb)
  );

  controller #(
    .T_RCD(T_RCD), .T_RP(T_RP), .T_RFC(T_RFC), .T_MRD(T_MRD),
    .T_WR(T_WR), .T_RC(T_RC), .INIT_WAIT(INIT_WAIT)
  ) u_controller (
    .clk(clk), .reset(reset), .u_cmd(u_cmd),
    .burst_end(burst_end), .cas_lat_end(cas_lat_end), .rcd_end(rcd_end),
    .burst_8(burst_8), .burst_2(burst_2), .cas_lat_max(cas_lat_max),
    .ld_burst(ld_burst), .ld_cas_lat(ld_cas_lat), .ld_rcd(ld_rcd),
    .rcd_val(rcd_val), .ld_addr(ld_addr), .mrs_addr(mrs_addr),
    .mrs_src(mrs_src), .row_addr(row_addr),
    .ddr_rasb(ddr_rasb), .ddr_casb(ddr_casb), .ddr_web(ddr_web),
    .ddr_csb(ddr_csb), .ddr_cke(ddr_cke),
    .ddr_dqs_t(ddr_dqs_t), .ddr_write_en(ddr_write_en),
    .ddr_read_en(ddr_read_en), .u_data_valid_en(u_data_valid_en),
    .u_ref_ack(u_ref_ack), .u_busy(u_busy)
  );

  ddr_counter #(.WIDTH(2)) u_brst_cntr (
    .clk(clk), .reset(reset), .ld(ld_burst), .load_val(burst_max), .cnt_end(burst_end)
  );

  ddr_counter #(.WIDTH(2)) u_cst_cntr (
    .clk(clk), .reset(reset), .ld(ld_cas_lat), .load_val(cas_lat_max), .cnt_end(cas_lat_end)
  );

  ddr_counter #(.WIDTH(4)) u_rcd_cntr (
    .clk(clk), .reset(reset), .ld(ld_rcd), .load_val(rcd_val), .cnt_end(rcd_end)
  );

  address_latch #(.MR_INIT(MR_INIT), .EMR_INIT(EMR_INIT)) u_address_latch (
    .clk(clk), .reset(reset), .u_addr(u_addr), .ld_addr(ld_addr),
    .mrs_addr(mrs_addr), .mrs_src(mrs_src), .row_addr(row_addr),
    .ddr_ad(ddr_ad), .ddr_ba(ddr_ba), .burst_2(burst_2), .burst_8(burst_8),
    .burst_max(burst_max), .cas_lat_max(cas_lat_max), .cas_lat_half(cas_lat_half)
  );

  data_path u_data_path (
    .clk(clk), .clk2x(clk2x), .reset(reset),
    .u_data_i(u_data_i), .u_data_o(u_data_o), .u_data_valid(u_data_valid),
    .ddr_dqs_t(ddr_dqs_t), .ddr_write_en(ddr_write_en), .ddr_read_en(ddr_read_en),
    .u_data_valid_en(u_data_valid_en), .cas_half(cas_lat_half[0]),
    .ddr_dq_o(ddr_dq_o), .ddr_dq_oe(ddr_dq_oe), .ddr_dq_i(ddr_dq_i),
    .ddr_dqs_o(ddr_dqs_o), .ddr_dqs_oe(ddr_dqs_oe)
  );

  assign ddr_dm = '0;

endmodule
