// ddr_counter: loadable down counter with an end flag.
//
// One module serves the burst counter, the CAS latency counter and the
// RAS-to-CAS (tRCD) counter of the controller, and also the controller's
// own recovery and power-up timers. The controller raises `ld` for one or
// more cycles in the state that starts a wait; the counter then holds
// `load_val` and counts down by one per clock until it reaches zero, where
// it stays. `cnt_end` is high while the count is zero and no load is being
// requested, so a state that loads the counter never sees a stale end flag.
//
// Timing: if `ld` is high in cycle n only, `cnt_end` is first high in cycle
// n + 1 + load_val. Reset clears the count (so `cnt_end` is high).
// The document names the three counters and says the burst count decides
// when the next READ or WRITE may be issued; the load/end interface and the
// down-counting are this design's choice.
module ddr_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             ld,
  input  logic [WIDTH-1:0] load_val,
  output logic             cnt_end
);

  logic [WIDTH-1:0] cnt;

  always_ff @(posedge clk) begin
    if (reset)            cnt <= '0;
    else if (ld)          cnt <= load_val;
    else if (cnt != '0)   cnt <= cnt - 1'b1;
  end

  assign cnt_end = (cnt == '0) && !ld;

endmodule
