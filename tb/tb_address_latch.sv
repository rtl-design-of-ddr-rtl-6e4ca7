// tb_address_latch: self-checking test of the address latch.
//
// Checks the address split of random user addresses (bank u_addr[21:20],
// row u_addr[19:8] on row_addr, column u_addr[7:0] with A10 set otherwise),
// the known example 0x297863 -> bank 2, row 0x978, column word 0x463, that
// u_addr is only taken on ld_addr, the two power-up mode-register values,
// and the burst-length / CAS-latency decode of every supported mode
// register setting against a table written out here.
module tb_address_latch;
  import ddr_pkg::*;
  logic        clk = 0, reset, ld_addr, mrs_addr, row_addr;
  logic [21:0] u_addr;
  mrs_src_e    mrs_src;
  logic [11:0] ddr_ad;
  logic [1:0]  ddr_ba, burst_max, cas_lat_max, cas_lat_half;
  logic        burst_2, burst_8;
  int checks = 0, failures = 0;

  address_latch dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic expect_mode(input int bl, input int cl2x, input string what);
    // cl2x: CAS latency in half clocks
    check(burst_2 == (bl == 2) && burst_8 == (bl == 8), {what, ": burst length flags"});
    check(burst_max == ((bl == 8) ? 2'd2 : 2'd0), {what, ": burst_max"});
    check(cas_lat_max == 2'((cl2x / 2) - 2), {what, ": cas_lat_max"});
    check(cas_lat_half == 2'(cl2x - 4), {what, ": cas_lat_half"});
  endtask

  task automatic load(input logic [21:0] a);
    u_addr = a; ld_addr = 1;
    @(posedge clk); #1;
    ld_addr = 0; u_addr = ~a;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; ld_addr = 0; mrs_addr = 0; row_addr = 0; mrs_src = MRS_USER; u_addr = '0;
    @(posedge clk); #1;
    reset = 0;
    expect_mode(4, 4, "after reset");

    // reference waveform address
    load(22'h297863);
    row_addr = 1; #1;
    check(ddr_ba == 2 && ddr_ad == 12'h978, "row of 0x297863");
    row_addr = 0; #1;
    check(ddr_ba == 2 && ddr_ad == 12'h463, "column of 0x297863");

    // random addresses
    for (int i = 0; i < 200; i++) begin
      logic [21:0] a;
      a = 22'($urandom);
      load(a);
      row_addr = 1; #1;
      check(ddr_ba == a[21:20] && ddr_ad == a[19:8], "row split");
      row_addr = 0; #1;
      check(ddr_ba == a[21:20] && ddr_ad == {4'b0100, a[7:0]}, "column split with A10");
      @(posedge clk); #1;
      check(ddr_ad == {4'b0100, a[7:0]}, "address held without ld_addr");
    end

    // power-up mode register values
    mrs_addr = 1; mrs_src = MRS_INIT_EMR; #1;
    check(ddr_ba == 2'b01 && ddr_ad == 12'h000, "power-up EMR value");
    @(posedge clk); #1;
    expect_mode(4, 4, "EMR leaves mode alone");
    mrs_src = MRS_INIT_MR; #1;
    check(ddr_ba == 2'b00 && ddr_ad == 12'h122, "power-up MR value (BL4 CL2 DLL reset)");
    @(posedge clk); #1;
    mrs_addr = 0;
    expect_mode(4, 4, "power-up MR");

    // user mode register settings
    mrs_src = MRS_USER;
    for (int r = 0; r < 30; r++) begin
      int bl, cl2x;
      logic [2:0] blc, clc;
      bl   = (r % 3 == 0) ? 2 : (r % 3 == 1) ? 4 : 8;
      cl2x = ((r / 3) % 3 == 0) ? 4 : ((r / 3) % 3 == 1) ? 5 : 6;
      blc  = (bl == 2) ? 3'b001 : (bl == 4) ? 3'b010 : 3'b011;
      clc  = (cl2x == 4) ? 3'b010 : (cl2x == 5) ? 3'b110 : 3'b011;
      load({2'b00, 8'($urandom), 5'b00000, clc, 1'b0, blc});
      mrs_addr = 1; #1;
      check(ddr_ba == 2'b00 && ddr_ad[6:0] == {clc, 1'b0, blc}, "user MR value on the bus");
      @(posedge clk); #1;
      mrs_addr = 0;
      expect_mode(bl, cl2x, $sformatf("user MR BL%0d CL%0d/2", bl, cl2x));
      // an extended mode register write does not change the mode
      load({2'b01, 8'h00, 12'h001});
      mrs_addr = 1;
      @(posedge clk); #1;
      mrs_addr = 0;
      expect_mode(bl, cl2x, "after EMR write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
