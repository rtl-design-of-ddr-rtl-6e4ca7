// address_latch: row, column, bank and mode-register address generation.
//
// The user address u_addr[21:0] is latched when the controller accepts a
// command (ld_addr). It splits as bank = u_addr[21:20], row = u_addr[19:8]
// and column = u_addr[7:0]; this matches the reference waveform, where
// u_addr 0x297863 gives bank 2, row 0x978 at ACTIVE and 0x463 at WRITE.
// The controller chooses what drives ddr_ad/ddr_ba:
//   mrs_addr  - the mode-register value (user address, or one of the two
//               power-up values selected by mrs_src),
//   row_addr  - the latched row,
//   otherwise - the latched column with A10 set, which requests auto
//               precharge on READ/WRITE and "all banks" on PRECHARGE.
// Every value issued with mrs_addr to bank 0 (mode register) is kept, and
// its burst-length and CAS-latency fields are decoded into the controls
// of the burst and CAS latency counters:
//   burst_2, burst_8  - burst length 2 or 8 (neither: 4),
//   burst_max         - burst counter load for burst length 8 (2, else 0;
//                       so its bit 0 is always 0 and is kept only to give
//                       the counter load its full width),
//   cas_lat_max       - whole CAS latency cycles minus 2 (CAS counter load),
//   cas_lat_half      - CAS latency in half cycles minus 4 (CL2=0, CL2.5=1,
//                       CL3=2); bit 0 tells the data path about a half cycle.
// Unsupported field codes decode as burst length 4 and CAS latency 2.
// Outputs are combinational from registers and the controller's state
// decode, so they change together with the command pins.
// The port names follow the document's address latch; ld_addr, mrs_src and
// burst_max's width, and every encoding above, are this design's choices.
module address_latch
  import ddr_pkg::*;
#(
  parameter logic [AD_W-1:0] MR_INIT  = MR_BL4_CL2,  // mode register at power-up
  parameter logic [AD_W-1:0] EMR_INIT = '0           // extended MR: DLL enable
) (
  input  logic               clk,
  input  logic               reset,
  input  logic [UADDR_W-1:0] u_addr,
  input  logic               ld_addr,
  input  logic               mrs_addr,
  input  mrs_src_e           mrs_src,
  input  logic               row_addr,
  output logic [AD_W-1:0]    ddr_ad,
  output logic [BA_W-1:0]    ddr_ba,
  output logic               burst_2,
  output logic               burst_8,
  output logic [1:0]         burst_max,
  output logic [1:0]         cas_lat_max,
  output logic [1:0]         cas_lat_half
);

  logic [UADDR_W-1:0] addr_q;
  logic [AD_W-1:0]    mr_q;
  logic [AD_W-1:0]    mrs_ad;
  logic [BA_W-1:0]    mrs_ba;

  always_ff @(posedge clk) begin
    if (reset)        addr_q <= '0;
    else if (ld_addr) addr_q <= u_addr;
  end

  // Value of a LOAD MODE REGISTER command.
  always_comb begin
    unique case (mrs_src)
      MRS_INIT_EMR: begin mrs_ba = 2'b01; mrs_ad = EMR_INIT; end
      MRS_INIT_MR: begin
        mrs_ba = 2'b00;
        mrs_ad = MR_INIT | (AD_W'(1) << MR_DLL_RESET_BIT);
      end
      default: begin
        mrs_ba = addr_q[UADDR_W-1 -: BA_W];
        mrs_ad = addr_q[AD_W-1:0];
      end
    endcase
  end

  // Keep the mode register that the memory now holds.
  always_ff @(posedge clk) begin
    if (reset)                           mr_q <= MR_INIT;
    else if (mrs_addr && mrs_ba == 2'b00) mr_q <= mrs_ad;
  end

  always_comb begin
    if (mrs_addr) begin
      ddr_ad = mrs_ad;
      ddr_ba = mrs_ba;
    end else if (row_addr) begin
      ddr_ad = addr_q[COL_W +: AD_W];
      ddr_ba = addr_q[UADDR_W-1 -: BA_W];
    end else begin
      ddr_ad = {1'b0, 1'b1, {(AD_W-COL_W-2){1'b0}}, addr_q[COL_W-1:0]};
      ddr_ba = addr_q[UADDR_W-1 -: BA_W];
    end
  end

  // Burst-length and CAS-latency decode of the held mode register.
  always_comb begin
    burst_2 = (mr_q[2:0] == MR_BL2);
    burst_8 = (mr_q[2:0] == MR_BL8);
    burst_max = burst_8 ? 2'd2 : 2'd0;
    unique case (mr_q[6:4])
      MR_CL3:   begin cas_lat_max = 2'd1; cas_lat_half = 2'd2; end
      MR_CL2_5: begin cas_lat_max = 2'd0; cas_lat_half = 2'd1; end
      default:  begin cas_lat_max = 2'd0; cas_lat_half = 2'd0; end
    endcase
  end

endmodule
