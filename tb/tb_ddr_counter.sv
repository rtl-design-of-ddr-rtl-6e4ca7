// tb_ddr_counter: self-checking test of the loadable down counter.
//
// Loads random values at random times (including loads held for several
// cycles and loads before the previous count ended) and checks cnt_end
// every cycle against a reference that counts the cycles since the last
// load: cnt_end must be low while loading and rise exactly load_val
// cycles after the last load cycle, then stay high.
module tb_ddr_counter;
  logic       clk = 0, reset, ld;
  logic [3:0] load_val;
  logic       cnt_end;
  int checks = 0, failures = 0;

  ddr_counter #(.WIDTH(4)) dut (
    .clk(clk), .reset(reset), .ld(ld), .load_val(load_val), .cnt_end(cnt_end)
  );

  always #5 clk = !clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int remaining;   // reference: cycles left until end
    reset = 1; ld = 0; load_val = '0;
    @(posedge clk); #1;
    reset = 0;
    remaining = 0;
    for (int i = 0; i < 2000; i++) begin
      ld = ($urandom_range(0, 5) == 0);
      load_val = 4'($urandom);
      #1;
      checks++;
      if (cnt_end !== (!ld && remaining == 0)) begin
        failures++;
        $display("FAIL cycle %0d: cnt_end=%b ld=%b remaining=%0d", i, cnt_end, ld, remaining);
      end
      @(posedge clk); #1;
      if (ld) remaining = int'(load_val);
      else if (remaining > 0) remaining--;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
