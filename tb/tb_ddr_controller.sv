// tb_ddr_controller: test of the controller core (no input registers)
// against the behavioural memory model, with a short power-up wait.
//
// Runs the power-up sequence, then random writes and reads with burst
// lengths 4, 8 and 2 and CAS latencies 2, 3 and 2.5, with refreshes in
// between. Each read word is compared with a reference memory kept here
// (with its own sequential burst order) and must appear with u_data_valid
// in exactly cycle n+2+T_RCD+ceil(CL)+k for a READ accepted in cycle n.
// Write word k is given in cycle n+1+T_RCD+k. u_ref_ack must come one
// cycle after a REFRESH is accepted, and the memory model must see no
// broken rule.
`timescale 1ns/1ps
module tb_ddr_controller;
  import ddr_pkg::*;

  localparam int T_RCD = 3;
  localparam int INIT_WAIT = 100;

  logic         clk = 0, clk2x = 0, reset;
  logic [7:1]   u_cmd;
  logic [21:0]  u_addr;
  logic [127:0] u_data_i, u_data_o;
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

  initial forever begin
    #5 clk2x = 1; clk = !clk;
    #5 clk2x = 0;
  end
  always @(posedge clk) cyc++;

  ddr_controller #(.INIT_WAIT(INIT_WAIT)) dut (.*);

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
    if (!ok) begin failures++; $display("%t FAIL: %s", $realtime, what); end
  endtask

  logic [63:0] ref_mem [bit [21:0]];
  int bl = 4, cl_ceil = 2;

  function automatic logic [7:0] seq_col(input logic [7:0] col, input int i);
    int base;
    base = int'(col) - (int'(col) % bl);
    return 8'(base + ((int'(col) % bl) + i) % bl);
  endfunction

  task automatic next_cycle(); @(posedge clk); #1; endtask

  task automatic issue(input logic [7:1] cmd, input logic [21:0] addr, output longint n);
    while (u_busy) next_cycle();
    u_cmd = cmd; u_addr = addr; n = cyc;
    next_cycle();
    u_cmd = UCMD_NOP;
  endtask

  task automatic do_write(input logic [21:0] addr);
    longint n;
    logic [127:0] w;
    issue(UCMD_WRITE, addr, n);
    for (int k = 0; k < bl / 2; k++) begin
      while (cyc < n + 1 + T_RCD + k) next_cycle();
      w = {$urandom, $urandom, $urandom, $urandom};
      u_data_i = w;
      ref_mem[{addr[21:8], seq_col(addr[7:0], 2*k)}]   = w[63:0];
      ref_mem[{addr[21:8], seq_col(addr[7:0], 2*k+1)}] = w[127:64];
    end
    next_cycle();
    u_data_i = {$urandom, $urandom, $urandom, $urandom};
  endtask

  task automatic do_read(input logic [21:0] addr);
    longint n, first;
    issue(UCMD_READ, addr, n);
    first = n + 2 + T_RCD + cl_ceil;
    while (cyc <= first + bl / 2 + 2) begin
      if (cyc >= first && cyc < first + bl / 2) begin
        int k;
        logic [127:0] exp;
        k = int'(cyc - first);
        for (int hh = 0; hh < 2; hh++) begin
          logic [21:0] a;
          a = {addr[21:8], seq_col(addr[7:0], 2*k+hh)};
          exp[64*hh +: 64] = ref_mem.exists(a) ? ref_mem[a] : 64'h0;
        end
        check(u_data_valid && u_data_o == exp, $sformatf("read word %0d at %h", k, addr));
      end else begin
        check(!u_data_valid, "u_data_valid outside the read burst");
      end
      next_cycle();
    end
  endtask

  task automatic do_refresh();
    longint n;
    issue(UCMD_REFRESH, '0, n);
    #0;
    check(cyc == n + 1 && u_ref_ack, "u_ref_ack one cycle after REFRESH");
  endtask

  task automatic load_mode(input logic [2:0] bl_code, input logic [2:0] cl_code);
    longint n;
    issue(UCMD_LOAD_MR, {2'b00, 8'h00, 5'b00000, cl_code, 1'b0, bl_code}, n);
    bl = (bl_code == MR_BL2) ? 2 : (bl_code == MR_BL8) ? 8 : 4;
    cl_ceil = (cl_code == MR_CL2) ? 2 : 3;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; u_cmd = UCMD_NOP; u_addr = '0; u_data_i = '0;
    repeat (4) next_cycle();
    reset = 0;
    while (u_busy) next_cycle();
    check(mem.init_step == 7, "power-up sequence complete");
    for (int m = 0; m < 3; m++) begin
      if (m == 1) load_mode(MR_BL8, MR_CL3);
      if (m == 2) load_mode(MR_BL2, MR_CL2_5);
      for (int i = 0; i < 30; i++) begin
        logic [21:0] a;
        a = {2'($urandom), 12'($urandom_range(0, 3)), 8'($urandom)};
        if ($urandom_range(0, 1) == 0) do_write(a);
        do_read(a);
        if (i % 10 == 5) do_refresh();
      end
    end
    repeat (10) next_cycle();
    check(mem.errors == 0, $sformatf("memory model saw %0d rule violations", mem.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
