// tb_controller: self-checking test of the controller state machine.
//
// The counters and the address-latch mode flags are modelled in the test
// itself. With a short power-up wait the test checks:
//   - CKE low and chip deselected for exactly INIT_WAIT clocks,
//   - the power-up command order PRE, MRS(EMR), MRS(MR), PRE, REF, REF and
//     the gaps tRP, tMRD, tMRD, tRP, tRFC between them,
//   - for READ and WRITE with burst lengths 2, 4, 8 and CAS latencies 2
//     and 3: ACT one cycle after acceptance, READ/WRITE tRCD later, the
//     write enables and DQS control in the WRITE cycle, u_data_valid_en
//     and ddr_read_en floor(CL) cycles after READ, and the gap to the next
//     command (write recovery + tRP, or tRP / tRC after a read),
//   - u_ref_ack in the cycle of a user REFRESH, and only then.
module tb_controller;
  import ddr_pkg::*;
  localparam int T_RCD = 3, T_RP = 3, T_RFC = 8, T_MRD = 2, T_WR = 2, T_RC = 7;
  localparam int INIT_WAIT = 50;

  logic       clk = 0, reset;
  logic [7:1] u_cmd;
  logic       burst_end, cas_lat_end, rcd_end, burst_8, burst_2;
  logic [1:0] cas_lat_max;
  logic       ld_burst, ld_cas_lat, ld_rcd, ld_addr, mrs_addr, row_addr;
  logic [3:0] rcd_val;
  mrs_src_e   mrs_src;
  logic       ddr_rasb, ddr_casb, ddr_web, ddr_csb, ddr_cke, ddr_dqs_t;
  logic [7:0] ddr_write_en;
  logic [3:0] ddr_read_en;
  logic       u_data_valid_en, u_ref_ack, u_busy;
  int checks = 0, failures = 0;
  int cyc = 0;

  controller #(.T_RCD(T_RCD), .T_RP(T_RP), .T_RFC(T_RFC), .T_MRD(T_MRD),
               .T_WR(T_WR), .T_RC(T_RC), .INIT_WAIT(INIT_WAIT)) dut (.*);

  // reference counters: load value V on ld, end V cycles after the last ld
  int bc, cc, rc;
  logic [1:0] burst_max;
  always @(posedge clk) begin
    bc <= reset ? 0 : ld_burst ? int'(burst_max) : (bc > 0 ? bc - 1 : 0);
    cc <= reset ? 0 : ld_cas_lat ? int'(cas_lat_max) : (cc > 0 ? cc - 1 : 0);
    rc <= reset ? 0 : ld_rcd ? int'(rcd_val) : (rc > 0 ? rc - 1 : 0);
  end
  assign burst_end   = (bc == 0) && !ld_burst;
  assign cas_lat_end = (cc == 0) && !ld_cas_lat;
  assign rcd_end     = (rc == 0) && !ld_rcd;

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL at cycle %0d: %s", cyc, what); end
  endtask

  // command log
  int          log_cyc [$];
  logic [2:0]  log_cmd [$];
  mrs_src_e    log_src [$];
  logic [7:0]  log_wen [$];
  int          ve_cyc [$];
  logic [3:0]  ve_ren [$];
  int          ack_cyc [$];
  always @(posedge clk) if (!reset) begin
    if (!ddr_csb && {ddr_rasb, ddr_casb, ddr_web} != 3'b111) begin
      log_cyc.push_back(cyc);
      log_cmd.push_back({ddr_rasb, ddr_casb, ddr_web});
      log_src.push_back(mrs_src);
      log_wen.push_back(ddr_write_en);
      check(ddr_dqs_t == ({ddr_rasb, ddr_casb, ddr_web} == 3'b100), "ddr_dqs_t only with WRITE");
      check(row_addr == ({ddr_rasb, ddr_casb, ddr_web} == 3'b011), "row_addr only with ACT");
      check(mrs_addr == ({ddr_rasb, ddr_casb, ddr_web} == 3'b000), "mrs_addr only with MRS");
    end else begin
      check(ddr_write_en == 0 && !ddr_dqs_t, "no write enable without WRITE");
    end
    if (u_data_valid_en) begin ve_cyc.push_back(cyc); ve_ren.push_back(ddr_read_en); end
    else check(ddr_read_en == 0, "ddr_read_en only with u_data_valid_en");
    if (u_ref_ack) ack_cyc.push_back(cyc);
  end

  function automatic logic [2:0] cmd_at(int i); return log_cmd[i]; endfunction

  task automatic next_cycle(); @(posedge clk); #1; endtask

  task automatic issue(input logic [7:1] c, output int n);
    while (u_busy) next_cycle();
    u_cmd = c;
    #1;
    check(ld_addr, "ld_addr when a command is accepted");
    n = cyc;
    next_cycle();
    u_cmd = UCMD_NOP;
  endtask

  task automatic set_mode(input int bl, input int clw);
    burst_2 = (bl == 2); burst_8 = (bl == 8);
    burst_max = (bl == 8) ? 2'd2 : 2'd0;
    cas_lat_max = 2'(clw - 2);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, k, cke_low, idx;
    reset = 1; u_cmd = UCMD_NOP; set_mode(4, 2);
    repeat (3) next_cycle();
    reset = 0;
    cke_low = 0;
    while (u_busy) begin
      if (!ddr_cke) begin
        cke_low++;
        check(ddr_csb, "deselected while CKE low");
      end
      next_cycle();
    end
    check(cke_low == INIT_WAIT + 1, $sformatf("CKE low for the power-up wait (%0d)", cke_low));
    check(log_cmd.size() == 6, "six power-up commands");
    if (log_cmd.size() == 6) begin
      check(log_cmd[0] == DCMD_PRE, "power-up 1: PRECHARGE");
      check(log_cmd[1] == DCMD_MRS && log_src[1] == MRS_INIT_EMR, "power-up 2: EMR");
      check(log_cmd[2] == DCMD_MRS && log_src[2] == MRS_INIT_MR, "power-up 3: MR");
      check(log_cmd[3] == DCMD_PRE, "power-up 4: PRECHARGE");
      check(log_cmd[4] == DCMD_REF && log_cmd[5] == DCMD_REF, "power-up 5,6: REFRESH");
      check(log_cyc[1] - log_cyc[0] == T_RP, "gap tRP");
      check(log_cyc[2] - log_cyc[1] == T_MRD, "gap tMRD");
      check(log_cyc[3] - log_cyc[2] == T_MRD, "gap tMRD");
      check(log_cyc[4] - log_cyc[3] == T_RP, "gap tRP");
      check(log_cyc[5] - log_cyc[4] == T_RFC, "gap tRFC");
    end
    check(ack_cyc.size() == 0, "no u_ref_ack during power-up");

    for (int rep = 0; rep < 18; rep++) begin
      int bl, clw, ncmd, gap_exp;
      bit wr;
      bl  = (rep % 3 == 0) ? 2 : (rep % 3 == 1) ? 4 : 8;
      clw = ((rep / 3) % 2 == 0) ? 2 : 3;
      wr  = ((rep / 6) % 2 == 0);
      set_mode(bl, clw);
      idx = log_cmd.size();
      issue(wr ? UCMD_WRITE : UCMD_READ, n);
      // follow with a refresh as soon as allowed
      issue(UCMD_REFRESH, k);
      repeat (3) next_cycle();
      check(log_cmd.size() == idx + 3, "ACT, READ/WRITE, REFRESH issued");
      if (log_cmd.size() == idx + 3) begin
        check(log_cmd[idx] == DCMD_ACT && log_cyc[idx] == n + 1, "ACT one cycle after acceptance");
        check(log_cmd[idx+1] == (wr ? DCMD_WRITE : DCMD_READ) &&
              log_cyc[idx+1] == n + 1 + T_RCD, "READ/WRITE tRCD after ACT");
        if (wr) begin
          check(log_wen[idx+1] == ((bl == 2) ? 8'h03 : (bl == 4) ? 8'h0f : 8'hff),
                "ddr_write_en: one bit per beat");
          gap_exp = 1 + bl / 2 + T_WR + T_RP;
          if (T_RC - T_RCD > gap_exp) gap_exp = T_RC - T_RCD;
        end else begin
          check(ve_cyc.size() > 0 && ve_cyc[$] == log_cyc[idx+1] + clw,
                $sformatf("u_data_valid_en CL=%0d after READ", clw));
          check(ve_ren.size() > 0 && ve_ren[$] == ((bl == 2) ? 4'h1 : (bl == 4) ? 4'h3 : 4'hf),
                "ddr_read_en: one bit per clock of data");
          gap_exp = bl / 2 + T_RP;
          if (T_RC - T_RCD > gap_exp) gap_exp = T_RC - T_RCD;
          // the state machine stays busy at least until the data is due
          if (clw + (bl == 8 ? 3 : 0) > gap_exp - 1) gap_exp = clw + (bl == 8 ? 3 : 0) + 1;
        end
        check(log_cmd[idx+2] == DCMD_REF && log_cyc[idx+2] - log_cyc[idx+1] == gap_exp,
              $sformatf("recovery after %s BL%0d CL%0d: %0d, expected %0d", wr ? "WRITE" : "READ",
                        bl, clw, log_cyc[idx+2] - log_cyc[idx+1], gap_exp));
        check(ack_cyc.size() > 0 && ack_cyc[$] == log_cyc[idx+2] && ack_cyc[$] == k + 1,
              "u_ref_ack with the user REFRESH");
      end
    end
    check(ack_cyc.size() == 18, "one u_ref_ack per user REFRESH");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
