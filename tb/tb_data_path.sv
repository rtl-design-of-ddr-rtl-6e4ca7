// tb_data_path: self-checking test of the double-data-rate data path.
//
// clk2x runs at twice clk and rises with it; h counts clk2x rising edges.
// Write bursts of 2, 4 and 8 beats: the test gives ddr_dqs_t and
// ddr_write_en in cycle w and user word k in cycle w+k, then checks after
// every clk2x edge that DQ carries beat j (low half of word j/2 for even j)
// from the clk2x edge 2+j half-cycles after cycle w starts, with its enable
// only during the burst, and that DQS shows the preamble, a rising edge in
// the middle of every even beat, a falling edge in the middle of every odd
// beat, half a clock of postamble, and is released otherwise.
// Read bursts with CAS latency 2, 2.5 and 3: the test acts as the memory,
// driving beat i on DQ from 2*CL+i half-cycles after a virtual READ in
// cycle r (edge-aligned with the memory clock, a quarter clock after
// clk) and garbage at all other times. It gives u_data_valid_en and
// ddr_read_en in cycle r+floor(CL) and checks u_data_valid and u_data_o
// in every cycle: word k = {beat 2k+1, beat 2k} in cycle r+1+ceil(CL)+k.
`timescale 1ns/1ps
module tb_data_path;
  import ddr_pkg::*;
  logic         clk = 0, clk2x = 0, reset;
  logic [127:0] u_data_i, u_data_o;
  logic         u_data_valid, ddr_dqs_t, u_data_valid_en, cas_half;
  logic [7:0]   ddr_write_en;
  logic [3:0]   ddr_read_en;
  logic [63:0]  ddr_dq_o, ddr_dq_i;
  logic         ddr_dq_oe, ddr_dqs_oe;
  logic [1:0]   ddr_dqs_o;
  int checks = 0, failures = 0;

  data_path dut (.*);

  initial forever begin
    #5 clk2x = 1; clk = !clk;
    #5 clk2x = 0;
  end

  int h = 0;
  always @(posedge clk2x) h <= h + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%t FAIL: %s", $realtime, what); end
  endtask

  task automatic next_cycle(); @(posedge clk); #1; endtask

  // ---------------- write monitor ----------------
  int          wr_h0 = -100, wr_bl = 0;
  logic [63:0] wr_beats [8];
  always @(posedge clk2x) begin
    int rel;
    #1;
    rel = h - wr_h0;
    if (!reset && h > 4) begin
      check(ddr_dq_oe == (rel >= 2 && rel < 2 + wr_bl), $sformatf("DQ enable, half-cycle %0d", rel));
      if (rel >= 2 && rel < 2 + wr_bl)
        check(ddr_dq_o == wr_beats[rel - 2], $sformatf("write beat %0d", rel - 2));
    end
  end
  always @(negedge clk2x) begin
    int rel;
    bit oe_exp, v_exp;
    #1;
    rel = h - wr_h0;
    oe_exp = (rel >= 1 && rel <= 2 + wr_bl);
    v_exp  = (rel >= 2 && rel < 2 + wr_bl) && ((rel - 2) % 2 == 0);
    if (!reset && h > 4) begin
      check(ddr_dqs_oe == oe_exp, $sformatf("DQS enable, half-cycle %0d", rel));
      if (oe_exp) check(ddr_dqs_o == {2{v_exp}}, $sformatf("DQS level, half-cycle %0d", rel));
    end
  end

  // ---------------- memory side for reads ----------------
  int          rd_h0 = -100, rd_cl2 = 4, rd_bl = 0;
  logic [63:0] rd_beats [8];
  always @(negedge clk2x) begin
    int rel;
    rel = h - rd_h0 - rd_cl2;
    ddr_dq_i <= (rel >= 0 && rel < rd_bl) ? rd_beats[rel] : {$urandom, $urandom};
  end

  task automatic do_write(input int bl);
    logic [127:0] words [4];
    for (int k = 0; k < bl / 2; k++) begin
      words[k] = {$urandom, $urandom, $urandom, $urandom};
    end
    next_cycle();
    wr_h0 = h;
    wr_bl = bl;
    for (int j = 0; j < bl; j++) wr_beats[j] = words[j / 2][64 * (j % 2) +: 64];
    ddr_dqs_t = 1;
    ddr_write_en = 8'((1 << bl) - 1);
    for (int k = 0; k < bl / 2; k++) begin
      u_data_i = words[k];
      next_cycle();
      ddr_dqs_t = 0;
      ddr_write_en = '0;
    end
    u_data_i = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) next_cycle();
  endtask

  task automatic do_read(input int bl, input int cl2);
    int r, clw, first, got;
    logic [127:0] exp;
    next_cycle();
    r = 0;
    rd_h0 = h;
    rd_cl2 = cl2;
    rd_bl = bl;
    for (int i = 0; i < bl; i++) rd_beats[i] = {$urandom, $urandom};
    clw = cl2 / 2;
    first = 1 + (cl2 + 1) / 2;
    got = 0;
    cas_half = cl2 % 2;
    for (int m = 0; m < first + bl / 2 + 3; m++) begin
      u_data_valid_en = (m == clw);
      ddr_read_en     = (m == clw) ? 4'((1 << (bl / 2)) - 1) : 4'h0;
      if (m >= first && m < first + bl / 2) begin
        exp = {rd_beats[2 * (m - first) + 1], rd_beats[2 * (m - first)]};
        check(u_data_valid, $sformatf("u_data_valid BL%0d CL%0d/2 cycle %0d", bl, cl2, m));
        check(u_data_o == exp, $sformatf("read word %0d BL%0d CL%0d/2", m - first, bl, cl2));
      end else begin
        check(!u_data_valid, $sformatf("no u_data_valid BL%0d CL%0d/2 cycle %0d", bl, cl2, m));
      end
      next_cycle();
    end
    rd_bl = 0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; ddr_dqs_t = 0; ddr_write_en = '0; ddr_read_en = '0;
    u_data_valid_en = 0; cas_half = 0; u_data_i = '0;
    repeat (4) next_cycle();
    reset = 0;
    for (int rep = 0; rep < 60; rep++) begin
      int bl, cl2;
      bl  = (rep % 3 == 0) ? 2 : (rep % 3 == 1) ? 4 : 8;
      cl2 = 4 + (rep / 3) % 3;
      do_write(bl);
      do_read(bl, cl2);
      repeat ($urandom_range(0, 2)) next_cycle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
