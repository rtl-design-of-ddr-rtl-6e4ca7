// tb_ddr_top: end-to-end test of the DDR SDRAM controller at its default
// parameters, against the behavioural memory model.
//
// The test runs the power-up sequence (CKE low for the full power-up wait),
// then writes and reads bursts with every burst length (2, 4, 8) and CAS
// latency (2, 2.5, 3) the controller supports, switching between them with
// user LOAD_MR commands. It checks:
//   - every read word against a reference memory kept by the test, with its
//     own computation of the sequential burst order,
//   - the exact cycle of every read word and of write data consumption,
//   - the bank/row/column split of a known address (0x297863 gives bank 2,
//     row 0x978 on ACT and 0x463, A10 set, on WRITE),
//   - that write bursts take two beats per memory clock,
//   - REFRESH acknowledge timing, user PRECHARGE, a command ignored while
//     busy, and no rule broken at the memory model.
// It also counts how often each controller mechanism happened (ACT_WAIT
// loop, READ_WAIT loop, READ_DATA / WRITE_DATA bursts, WRITE straight back
// to IDLE, half-cycle CAS latency capture, refresh, mode switch, busy
// rejection) and fails any that never did.
`timescale 1ns/1ps
module tb_ddr_top;
  import ddr_pkg::*;

  localparam int T_RCD = 3;
  localparam int INIT_WAIT = 20000;

  logic         clk = 0, clk2x = 0;
  logic         u_reset_n;
  logic [7:1]   u_cmd;
  logic [21:0]  u_addr;
  logic [127:0] u_data_i;
  logic [127:0] u_data_o;
  logic         u_data_valid, u_ref_ack, u_busy;
  logic         ddr_clk, ddr_clkb, ddr_cke, ddr_csb, ddr_rasb, ddr_casb, ddr_web;
  logic [1:0]   ddr_ba;
  logic [11:0]  ddr_ad;
  logic [7:0]   ddr_dm;
  logic [63:0]  ddr_dq_o, ddr_dq_i;
  logic         ddr_dq_oe, ddr_dqs_oe, mem_dq_oe;
  logic [1:0]   ddr_dqs_o;

  int checks = 0, failures = 0;
  longint cyc = 0;

  // clk2x rises with every clk edge change; clk rises on every other one.
  initial forever begin
    #5 clk2x = 1; clk = !clk;
    #5 clk2x = 0;
  end
  always @(posedge clk) cyc++;

  ddr_top dut (
    .u_clk(clk), .u_clk2x(clk2x), .u_reset_n(u_reset_n), .u_cmd(u_cmd),
    .u_addr(u_addr), .u_data_i(u_data_i), .u_data_o(u_data_o),
    .u_data_valid(u_data_valid), .u_ref_ack(u_ref_ack), .u_busy(u_busy),
    .ddr_clk(ddr_clk), .ddr_clkb(ddr_clkb), .ddr_cke(ddr_cke), .ddr_csb(ddr_csb),
    .ddr_rasb(ddr_rasb), .ddr_casb(ddr_casb), .ddr_web(ddr_web),
    .ddr_ba(ddr_ba), .ddr_ad(ddr_ad), .ddr_dm(ddr_dm),
    .ddr_dq_o(ddr_dq_o), .ddr_dq_oe(ddr_dq_oe), .ddr_dq_i(ddr_dq_i),
    .ddr_dqs_o(ddr_dqs_o), .ddr_dqs_oe(ddr_dqs_oe)
  );

  ddr_sdram_model #(.T_RCD(T_RCD)) mem (
    .ddr_clk(ddr_clk), .ddr_cke(ddr_cke), .ddr_csb(ddr_csb),
    .ddr_rasb(ddr_rasb), .ddr_casb(ddr_casb), .ddr_web(ddr_web),
    .ddr_ba(ddr_ba), .ddr_ad(ddr_ad),
    .dq_in(ddr_dq_o), .dq_in_oe(ddr_dq_oe),
    .dqs_in(ddr_dqs_o[0]), .dqs_in_oe(ddr_dqs_oe),
    .dq_out(ddr_dq_i), .dq_out_oe(mem_dq_oe)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t FAIL: %s", $realtime, what);
    end
  endtask

  // ---------------- reference memory and mode ----------------
  logic [63:0] ref_mem [bit [21:0]];
  int bl = 4;          // burst length in beats
  int cl_ceil = 2;     // CAS latency rounded up, clocks
  bit cl_half = 0;

  function automatic logic [7:0] seq_col(input logic [7:0] col, input int i);
    int base;
    base = int'(col) - (int'(col) % bl);
    return 8'(base + ((int'(col) % bl) + i) % bl);
  endfunction

  // ---------------- mechanism counters ----------------
  int m_act_wait_loop = 0, m_read_wait_loop = 0, m_read_data = 0, m_write_data = 0;
  int m_write_bl2 = 0, m_half_cas = 0, m_refresh = 0, m_mode_switch = 0;
  int m_busy_reject = 0, m_user_pre = 0, m_init = 0;
  state_e st_prev;

  always @(posedge clk) begin
    state_e st;
    st = dut.u_ddr_controller.u_controller.state;
    if (st == S_ACT_WAIT && st_prev == S_ACT_WAIT) m_act_wait_loop++;
    if (st == S_READ_WAIT && st_prev == S_READ_WAIT) m_read_wait_loop++;
    if (st == S_READ_DATA && st_prev != S_READ_DATA) m_read_data++;
    if (st == S_WRITE_DATA && st_prev == S_WRITE_DATA) m_write_data++;
    if (st == S_IDLE && st_prev == S_WRITE) m_write_bl2++;
    st_prev = st;
  end

  // ---------------- command bus monitor ----------------
  logic [11:0] last_act_ad, last_wr_ad;
  logic [1:0]  last_act_ba, last_wr_ba;
  always @(posedge ddr_clk) begin
    if (!ddr_csb && {ddr_rasb, ddr_casb, ddr_web} == 3'b011) begin
      last_act_ad = ddr_ad; last_act_ba = ddr_ba;
    end
    if (!ddr_csb && {ddr_rasb, ddr_casb, ddr_web} == 3'b100) begin
      last_wr_ad = ddr_ad; last_wr_ba = ddr_ba;
    end
  end

  // Write DQS edges: time of first and last beat of each burst.
  realtime dqs_first, dqs_last;
  int dqs_edges = 0;
  always @(ddr_dqs_o[0]) if (ddr_dqs_oe) begin
    if (dqs_edges == 0) dqs_first = $realtime;
    dqs_last = $realtime;
    dqs_edges++;
  end

  // ---------------- user-side tasks ----------------
  longint last_cmd = -10;

  task automatic next_cycle();
    @(posedge clk); #1;
  endtask

  task automatic issue(input logic [7:1] cmd, input logic [21:0] addr, output longint n);
    next_cycle();
    while (u_busy || cyc == last_cmd + 1) next_cycle();
    u_cmd  = cmd;
    u_addr = addr;
    n = cyc;
    last_cmd = cyc;
    next_cycle();
    u_cmd = UCMD_NOP;
  endtask

  task automatic do_write(input logic [21:0] addr, output logic [127:0] words [4]);
    longint n;
    int nw, wr_before;
    nw = bl / 2;
    wr_before = mem.n_beats_written;
    for (int k = 0; k < nw; k++) words[k] = {$urandom, $urandom, $urandom, $urandom};
    dqs_edges = 0;
    issue(UCMD_WRITE, addr, n);
    for (int k = 0; k < nw; k++) begin
      while (cyc < n + 1 + T_RCD + k) next_cycle();
      u_data_i = words[k];
      ref_mem[{addr[21:8], seq_col(addr[7:0], 2*k)}]   = words[k][63:0];
      ref_mem[{addr[21:8], seq_col(addr[7:0], 2*k+1)}] = words[k][127:64];
    end
    next_cycle();
    u_data_i = {$urandom, $urandom, $urandom, $urandom};
    repeat (4) next_cycle();
    check(mem.n_beats_written - wr_before == bl, "write burst length at the memory");
    // two beats per memory clock: bl beats span (bl-1)/2 clocks
    check(dqs_edges == bl && (dqs_last - dqs_first) == (bl - 1) * 10.0,
          $sformatf("write beats at double data rate (%0d edges)", dqs_edges));
  endtask

  task automatic do_read(input logic [21:0] addr);
    longint n, first;
    int got;
    issue(UCMD_READ, addr, n);
    first = n + 3 + T_RCD + cl_ceil;
    got = 0;
    while (cyc <= first + bl / 2 + 2) begin
      if (cyc >= first && cyc < first + bl / 2) begin
        int k;
        logic [127:0] exp;
        k = int'(cyc - first);
        for (int h = 0; h < 2; h++) begin
          logic [21:0] a;
          a = {addr[21:8], seq_col(addr[7:0], 2*k+h)};
          exp[64*h +: 64] = ref_mem.exists(a) ? ref_mem[a] : 64'h0;
        end
        check(u_data_valid, $sformatf("u_data_valid in read cycle %0d", k));
        check(u_data_o == exp, $sformatf("read data word %0d at %h", k, addr));
        if (cl_half) m_half_cas++;
        got++;
      end else begin
        check(!u_data_valid, "u_data_valid outside the read burst");
      end
      next_cycle();
    end
  endtask

  task automatic load_mode(input logic [2:0] bl_code, input logic [2:0] cl_code);
    longint n;
    issue(UCMD_LOAD_MR, {2'b00, 8'h00, 5'b00000, cl_code, 1'b0, bl_code}, n);
    bl = (bl_code == MR_BL2) ? 2 : (bl_code == MR_BL8) ? 8 : 4;
    cl_ceil = (cl_code == MR_CL2) ? 2 : 3;
    cl_half = (cl_code == MR_CL2_5);
    m_mode_switch++;
  endtask

  task automatic do_refresh();
    longint n;
    int acks;
    issue(UCMD_REFRESH, '0, n);
    acks = 0;
    while (cyc <= n + 4) begin
      if (u_ref_ack) begin
        acks++;
        check(cyc == n + 2, "u_ref_ack two cycles after REFRESH");
      end
      next_cycle();
    end
    check(acks == 1, "one u_ref_ack per REFRESH");
    if (acks == 1) m_refresh++;
  endtask

  function automatic logic [21:0] rand_addr();
    return {2'($urandom), 12'($urandom_range(0, 7)), 8'($urandom)};
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    #(20.0 * (INIT_WAIT + 20000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main ----------------
  logic [127:0] w [4];
  initial begin
    longint n, cke_low;
    int pre_before;
    u_reset_n = 0;
    u_cmd = UCMD_NOP;
    u_addr = '0;
    u_data_i = '0;
    repeat (5) next_cycle();
    u_reset_n = 1;

    // power-up
    cke_low = 0;
    while (u_busy) begin
      if (!ddr_cke) cke_low++;
      next_cycle();
    end
    check(cke_low >= INIT_WAIT, $sformatf("CKE low for the power-up wait (%0d)", cke_low));
    check(mem.init_step == 7, "power-up sequence complete at the memory");
    check(mem.n_pre == 2 && mem.n_mrs == 2 && mem.n_ref == 2, "power-up commands");
    check(mem.mr == (MR_BL4_CL2 | 12'h100), "mode register: BL4, CL2, DLL reset");
    if (mem.init_step == 7) m_init++;

    // the address split of the reference waveform
    do_write(22'h297863, w);
    check(last_act_ba == 2'd2 && last_act_ad == 12'h978, "ACT bank 2 row 0x978");
    check(last_wr_ba == 2'd2 && last_wr_ad == 12'h463, "WRITE column 0x463 with A10");
    do_read(22'h297863);

    do_refresh();

    // a command given while busy is ignored
    pre_before = mem.n_pre;
    issue(UCMD_REFRESH, '0, n);
    next_cycle();
    check(u_busy, "busy after REFRESH");
    u_cmd = UCMD_PRECHARGE;
    next_cycle();
    u_cmd = UCMD_NOP;
    last_cmd = cyc;
    repeat (20) next_cycle();
    check(mem.n_pre == pre_before, "command during busy ignored");
    if (mem.n_pre == pre_before) m_busy_reject++;

    // user precharge
    issue(UCMD_PRECHARGE, '0, n);
    repeat (4) next_cycle();
    check(mem.n_pre == pre_before + 1, "user PRECHARGE issued");
    if (mem.n_pre == pre_before + 1) m_user_pre++;

    // burst length 8, CAS latency 3, including a wrapping start column
    load_mode(MR_BL8, MR_CL3);
    do_write(22'h1_005_65, w);
    do_read(22'h1_005_65);
    do_read(22'h1_005_60);
    do_write(22'h3_00a_00, w);
    do_read(22'h3_00a_00);

    // burst length 2, CAS latency 2.5
    load_mode(MR_BL2, MR_CL2_5);
    do_write(22'h0_003_11, w);
    do_read(22'h0_003_11);
    do_read(22'h1_005_66);   // beat written by the burst of 8

    // back to the power-up setting, random traffic
    load_mode(MR_BL4, MR_CL2);
    for (int i = 0; i < 40; i++) begin
      logic [21:0] a;
      a = rand_addr();
      if ($urandom_range(0, 1) == 0) do_write(a, w);
      else do_read(a);
      if (i % 10 == 9) do_refresh();
    end
    // read back everything written so far with burst length 8
    load_mode(MR_BL8, MR_CL2);
    foreach (ref_mem[a]) if (a[2:0] == 3'b000) do_read(a);

    repeat (10) next_cycle();
    check(mem.errors == 0, $sformatf("memory model saw %0d rule violations", mem.errors));

    check(m_init > 0, "mechanism: power-up sequence");
    check(m_act_wait_loop > 0, "mechanism: ACT_WAIT loop");
    check(m_read_wait_loop > 0, "mechanism: READ_WAIT loop");
    check(m_read_data > 0, "mechanism: READ_DATA burst");
    check(m_write_data > 0, "mechanism: WRITE_DATA burst loop");
    check(m_write_bl2 > 0, "mechanism: WRITE straight to IDLE");
    check(m_half_cas > 0, "mechanism: half-cycle CAS latency");
    check(m_refresh > 0, "mechanism: refresh acknowledge");
    check(m_mode_switch > 0, "mechanism: mode register switch");
    check(m_busy_reject > 0, "mechanism: command ignored while busy");
    check(m_user_pre > 0, "mechanism: user precharge");
    $display("mechanisms: init=%0d act_wait_loop=%0d read_wait_loop=%0d read_data=%0d write_data_loop=%0d write_bl2=%0d half_cas=%0d refresh=%0d mode_switch=%0d busy_reject=%0d user_pre=%0d",
             m_init, m_act_wait_loop, m_read_wait_loop, m_read_data, m_write_data,
             m_write_bl2, m_half_cas, m_refresh, m_mode_switch, m_busy_reject, m_user_pre);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
