// tb_user_interface: self-checking test of the user-side input registers.
//
// Drives random commands, addresses and data every cycle and checks that
// each appears on the registered outputs exactly one cycle later. Checks
// that the synchronised reset rises within two cycles of u_reset_n going
// low, falls exactly two cycles after it goes high, and that the
// registered command is NOP while reset is active.
module tb_user_interface;
  import ddr_pkg::*;
  logic         clk = 0, u_reset_n, reset;
  logic [7:1]   u_cmd, cmd_q;
  logic [21:0]  u_addr, addr_q;
  logic [127:0] u_data_i, data_q;
  int checks = 0, failures = 0;

  user_interface dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%t FAIL: %s", $realtime, what); end
  endtask

  task automatic next_cycle(); @(posedge clk); #1; endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:1]   pc;
    logic [21:0]  pa;
    logic [127:0] pd;
    u_reset_n = 0; u_cmd = UCMD_READ; u_addr = '0; u_data_i = '0;
    repeat (2) next_cycle();
    check(reset, "reset within two cycles");
    repeat (2) next_cycle();
    check(reset && cmd_q == UCMD_NOP, "NOP while in reset");
    for (int rep = 0; rep < 20; rep++) begin
      u_reset_n = 1;
      next_cycle();
      check(reset, "reset still high one cycle after release");
      next_cycle();
      check(!reset, "reset low two cycles after release");
      for (int i = 0; i < 50; i++) begin
        pc = 7'($urandom); pa = 22'($urandom);
        pd = {$urandom, $urandom, $urandom, $urandom};
        u_cmd = pc; u_addr = pa; u_data_i = pd;
        next_cycle();
        check(cmd_q == pc && addr_q == pa && data_q == pd, "inputs registered one cycle");
      end
      u_reset_n = 0;
      u_cmd = UCMD_WRITE;
      repeat (3) next_cycle();
      check(reset && cmd_q == UCMD_NOP, "NOP while in reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
