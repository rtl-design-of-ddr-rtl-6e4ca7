// tb_ddr_clock: self-checking test of the forwarded memory clock.
//
// Checks at many points of each clk period that ddr_clk equals clk delayed
// by a quarter period (half a clk2x period) and that ddr_clkb is its
// complement, and measures that every rising edge of ddr_clk comes exactly
// a quarter period after a rising edge of clk.
`timescale 1ns/1ps
module tb_ddr_clock;
  logic clk = 0, clk2x = 0, ddr_clk, ddr_clkb;
  int checks = 0, failures = 0;
  realtime last_clk_rise = 0;

  ddr_clock dut (.*);

  initial forever begin
    #5 clk2x = 1; clk = !clk;
    #5 clk2x = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%t FAIL: %s", $realtime, what); end
  endtask

  always @(posedge clk) last_clk_rise = $realtime;
  always @(posedge ddr_clk) if ($realtime > 30)
    check($realtime - last_clk_rise == 5.0, "ddr_clk rises a quarter period after clk");

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic clk_hist [$];
    #31;
    for (int i = 0; i < 2000; i++) begin
      // sample every 2.5 ns; ddr_clk must equal clk two samples earlier
      clk_hist.push_back(clk);
      if (clk_hist.size() > 2) begin
        check(ddr_clk == clk_hist[0], "ddr_clk is clk delayed by a quarter period");
        check(ddr_clkb == !ddr_clk, "ddr_clkb is the complement");
        void'(clk_hist.pop_front());
      end
      #2.5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
